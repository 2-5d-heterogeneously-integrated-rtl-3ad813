// tb_uspi_node: self-checking test of the u-SPI master/slave module.
//
// Three nodes share a bus: node 0 starts as master, nodes 1 and 2 are
// slaves with a 256-word memory behind their back-end. The test runs a
// point-to-point write burst with address and CRC, a read back with CRC and
// CAC, a broadcast write with the burst multiplier, a write to an absent
// node (must not be acknowledged), a write whose data is corrupted on the
// wires (the slave must flag the CRC and refuse the ACK), a master pass
// from node 0 to node 2, a write issued by the new master, and a pass back.
// Memory contents, received words, ACKs, CRC flags, the M/S flags, the
// shielding of CAC beats and the exact duration of a packet are checked.
module tb_uspi_node;
  import neuro_pkg::*;
  localparam int N = 3, L = 4, W = 16, HALF = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk_o [N], sclk_oe [N], ss_n_o [N], ss_oe [N], d_oe [N];
  logic [L-1:0] d_o [N];
  logic sclk, ss_n, conflict; logic [L-1:0] d_bus, d_in, flip = '0;
  assign d_in = d_bus ^ flip;
  logic ms_flag [N];
  logic req_valid [N]; uspi_req_t req [N]; logic req_ready [N];
  logic [W-1:0] tx_data [N]; logic tx_pop [N]; logic rx_valid [N]; logic [W-1:0] rx_data [N];
  logic m_done [N], m_ack [N], m_crc_err [N];
  logic wr_valid [N]; logic [31:0] wr_addr [N]; logic [W-1:0] wr_data [N];
  logic rd_req [N]; logic [31:0] rd_addr [N]; logic [W-1:0] rd_data [N];
  logic s_crc_err [N], s_pass [N];

  uspi_bus #(.N(N), .LANES(L)) u_bus (.clk, .rst_n, .sclk_o, .sclk_oe, .ss_n_o, .ss_oe, .d_o, .d_oe,
    .sclk, .ss_n, .d(d_bus), .conflict);

  for (genvar i = 0; i < N; i++) begin : g_node
    uspi_node #(.LANES(L), .NODE_ID(4'(i)), .MS_INIT(i == 0), .MS_CAPABLE(1'b1),
                .SCLK_HALF(HALF), .WORD_W(W), .NDEV(16)) u_n (
      .clk, .rst_n, .sclk_o(sclk_o[i]), .sclk_oe(sclk_oe[i]), .ss_n_o(ss_n_o[i]), .ss_oe(ss_oe[i]),
      .d_o(d_o[i]), .d_oe(d_oe[i]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d_in), .ms_flag(ms_flag[i]),
      .req_valid(req_valid[i]), .req(req[i]), .req_ready(req_ready[i]), .tx_data(tx_data[i]),
      .tx_pop(tx_pop[i]), .rx_valid(rx_valid[i]), .rx_data(rx_data[i]), .m_done(m_done[i]),
      .m_ack(m_ack[i]), .m_crc_err(m_crc_err[i]), .wr_valid(wr_valid[i]), .wr_addr(wr_addr[i]),
      .wr_data(wr_data[i]), .rd_req(rd_req[i]), .rd_req_addr(), .rd_addr(rd_addr[i]), .rd_data(rd_data[i]),
      .s_crc_err(s_crc_err[i]), .s_pass(s_pass[i]));
  end

  // back-ends
  logic [W-1:0] mem [N][256];
  logic [W-1:0] txq [N][64];
  int txh [N];
  logic [W-1:0] rxq [64]; int nrx = 0;
  int cac_bad = 0, cac_beats = 0;
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (wr_valid[i]) mem[i][wr_addr[i][7:0]] <= wr_data[i];
      if (tx_pop[i]) txh[i]++;
      if (rx_valid[i]) begin rxq[nrx] = rx_data[i]; nrx++; end
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_be
    assign rd_data[i] = mem[i][rd_addr[i][7:0]];
    assign tx_data[i] = txq[i][txh[i] % 64];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uspi_req_t mk(uspi_mode_e mode, bit bc, bit blm_en, int bl, int blm,
                                   int amode, bit crc, bit cac, int ssel, int smask, int addr);
    uspi_req_t r;
    r.h1.mode = mode; r.h1.bcast = bc; r.h1.blm_en = blm_en; r.h1.bl = 4'(bl);
    r.h1.amode = 2'(amode); r.h1.crc = crc; r.h1.cac = cac;
    r.ssel = 4'(ssel); r.smask = 16'(smask); r.blm = 8'(blm); r.addr = 32'(addr);
    return r;
  endfunction

  int t_start, t_end;
  bit ack_seen;
  task automatic issue(input int m, input uspi_req_t r);
    @(negedge clk);
    req[m] = r; req_valid[m] = 1;
    t_start = $time / 10;
    @(negedge clk); req_valid[m] = 0;
    while (!m_done[m]) @(negedge clk);
    t_end = $time / 10;
    ack_seen = m_ack[m];
  endtask

  // CAC beats must leave the odd lanes at 0: watch D while the slave drives
  always @(posedge clk) if (g_node[1].u_n.s_act && g_node[1].u_n.s_h1.cac && d_oe[1]) begin
    cac_beats++;
    if (d_bus[1] || d_bus[3]) cac_bad++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      req_valid[i] = 0; req[i] = '0; txh[i] = 0;
      for (int a = 0; a < 256; a++) mem[i][a] = '0;
      for (int a = 0; a < 64; a++) txq[i][a] = 16'($urandom);
    end
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    check(ms_flag[0] && !ms_flag[1] && !ms_flag[2], "node 0 starts as master");

    // 1. write 4 words to node 1 at 0x10, CRC on
    issue(0, mk(USPI_WRITE, 0, 0, 3, 0, 1, 1, 0, 1, 0, 'h10));
    check(ack_seen, "write acknowledged");
    for (int k = 0; k < 4; k++) check(mem[1][16 + k] == txq[0][k], $sformatf("node1 word %0d", k));
    check(mem[2][16] == 0, "node 2 untouched");

    // 2. read them back with CRC and CAC
    nrx = 0;
    issue(0, mk(USPI_READ, 0, 0, 3, 0, 1, 1, 1, 1, 0, 'h10));
    check(nrx == 4, $sformatf("read %0d words", nrx));
    for (int k = 0; k < 4; k++) check(rxq[k] == txq[0][k], $sformatf("read word %0d", k));
    check(!m_crc_err[0], "read CRC good");
    check(cac_beats > 0 && cac_bad == 0, $sformatf("CAC shielding %0d/%0d", cac_bad, cac_beats));

    // 3. broadcast 2*3 = 6 words to nodes 1 and 2, 2-byte address 0x40
    issue(0, mk(USPI_WRITE, 1, 1, 1, 2, 2, 0, 0, 0, 'b110, 'h40));
    for (int k = 0; k < 6; k++) begin
      check(mem[1][64 + k] == txq[0][4 + k], $sformatf("bcast node1 word %0d", k));
      check(mem[2][64 + k] == txq[0][4 + k], $sformatf("bcast node2 word %0d", k));
    end

    // 4. absent node: no ACK; duration: 3 H1 + 1 SEL + 4 DATA + 1 TURN + 1 ACK beats
    issue(0, mk(USPI_WRITE, 0, 0, 0, 0, 0, 0, 0, 5, 0, 0));
    check(!ack_seen, "absent node not acknowledged");
    check(t_end - t_start == 10 * 2 * HALF + 2, $sformatf("packet takes %0d cycles", t_end - t_start));

    // 5. corrupted data on the wires: CRC error at the slave, NAK
    fork
      issue(0, mk(USPI_WRITE, 0, 0, 1, 0, 0, 1, 0, 2, 0, 0));
      begin
        // flip a lane during the first data beat (after 4 header beats)
        repeat (4 * 2 * HALF + 2) @(negedge clk);
        flip = 4'b0100; repeat (2 * HALF) @(negedge clk); flip = '0;
      end
    join
    check(!ack_seen, "corrupted write refused");
    check(s_crc_err[2], "slave flags CRC error");

    // 6. pass master to node 2
    issue(0, mk(USPI_PASS, 0, 0, 0, 0, 0, 0, 0, 2, 0, 0));
    repeat (4) @(negedge clk);
    check(ack_seen && !ms_flag[0] && ms_flag[2], "master passed to node 2");

    // 7. node 2 writes 2 words to node 1, then passes back to node 0
    issue(2, mk(USPI_WRITE, 0, 0, 1, 0, 1, 1, 1, 1, 0, 'h80));
    check(ack_seen, "write from new master acknowledged");
    check(mem[1][128] == txq[2][0] && mem[1][129] == txq[2][1], "new master data");
    issue(2, mk(USPI_PASS, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    repeat (4) @(negedge clk);
    check(ms_flag[0] && !ms_flag[2] && !ms_flag[1], "master passed back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
