// neuro_pkg: types and constants shared by the neural-sensing microsystem.
//
// Groups the numbers that several blocks must agree on: the 11-bit hybrid
// ADC split (3 coarse + 8 fine bits), the lifting-DWT word sizes (10-bit
// two's-complement data, 6-bit coefficients scaled by 16, 8 lifting steps,
// 10-cycle iterations), and the u-SPI hierarchical header (12-bit first
// level). Analog voltages are carried as 16-bit unsigned fractions of VDD
// (0 = 0 V, 65535 = just under VDD = 1.8 V); that representation is this
// design's own choice, used only by the behavioural analog models.
package neuro_pkg;

  // ---------------- analog representation ----------------
  typedef logic [15:0] volt_t;             // Vin / VDD * 65536
  localparam int unsigned VDD_MV = 1800;

  // ---------------- hybrid ADC ----------------
  localparam int ADC_BITS    = 11;
  localparam int COARSE_BITS = 3;
  localparam int FINE_BITS   = 8;
  localparam int TDC_TAPS    = 7;          // flip-flops of the two vernier lines (3 N + 4 P)
  typedef logic [ADC_BITS-1:0] adc_code_t;

  // ---------------- lifting DWT ----------------
  localparam int DWT_DW      = 10;         // X, Y, Z width
  localparam int DWT_CW      = 6;          // coefficient width
  localparam int DWT_CFRAC   = 4;          // coefficients are scaled by 16
  localparam int DWT_STEPS   = 8;
  localparam int DWT_IT_CYC  = 10;         // read + 8 computation + write
  typedef logic signed [DWT_DW-1:0] dwt_data_t;
  typedef logic signed [DWT_CW-1:0] dwt_coef_t;

  typedef enum logic [1:0] {
    WV_HAAR = 2'd0,
    WV_D2   = 2'd1,
    WV_SYM4 = 2'd2,
    WV_SYM6 = 2'd3
  } wavelet_e;

  // one DWT result: detail of a level, plus the approximation of that level
  typedef struct packed {
    logic [1:0] ch;
    logic [2:0] lvl;                       // 0 = level 1
    dwt_data_t  d;
    dwt_data_t  a;
  } dwt_out_t;

  // ---------------- u-SPI ----------------
  typedef enum logic [1:0] {
    USPI_WRITE = 2'b00,
    USPI_READ  = 2'b01,
    USPI_PASS  = 2'b10,                    // pseudo multi-master: hand over the M/S flag
    USPI_NOP   = 2'b11
  } uspi_mode_e;

  // first-level header, 12 bits, field order as sent (MSB first)
  typedef struct packed {
    uspi_mode_e mode;                      // 2
    logic       bcast;                     // 1
    logic       blm_en;                    // 1  BL mode: BLM field present
    logic [3:0] bl;                        // 4  burst length
    logic [1:0] amode;                     // 2  address bytes: 0,1,2,4
    logic       crc;                       // 1
    logic       cac;                       // 1
  } uspi_h1_t;

  localparam int USPI_AW = 32;

  // request presented by a master's back-end interface
  typedef struct packed {
    uspi_h1_t           h1;
    logic [3:0]         ssel;              // S-Sel-1: one slave
    logic [15:0]        smask;             // S-Sel-2: broadcast set
    logic [7:0]         blm;
    logic [USPI_AW-1:0] addr;
  } uspi_req_t;

  function automatic int unsigned uspi_addr_bytes(input logic [1:0] amode);
    case (amode)
      2'd0:    return 0;
      2'd1:    return 1;
      2'd2:    return 2;
      default: return 4;
    endcase
  endfunction

  // number of data words of a packet: (BL+1) * (BLM+1 when BL mode is set)
  function automatic int unsigned uspi_words(input uspi_h1_t h, input logic [7:0] blm);
    return (int'(h.bl) + 1) * (h.blm_en ? int'(blm) + 1 : 1);
  endfunction

endpackage
