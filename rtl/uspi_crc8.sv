// uspi_crc8: CRC-8 step of the u-SPI transport layer.
//
// Folds one DW-bit word, most significant bit first, into a running CRC
// with the polynomial x^8 + x^2 + x + 1 (0x07). The u-SPI packet carries
// one CRC byte after its data words when the header's CRC bit is set;
// sender and receiver start from 0 and fold in every data word. The
// source only says that CRC can be used; the polynomial, width and
// placement are this design's choices. Combinational.
module uspi_crc8 #(
  parameter int unsigned DW = 16
) (
  input  logic [7:0]    crc_in,
  input  logic [DW-1:0] data,
  output logic [7:0]    crc_out
);
  always_comb begin
    logic [7:0] c;
    c = crc_in;
    for (int i = DW - 1; i >= 0; i--) begin
      if (c[7] ^ data[i]) c = {c[6:0], 1'b0} ^ 8'h07;
      else                c = {c[6:0], 1'b0};
    end
    crc_out = c;
  end
endmodule
