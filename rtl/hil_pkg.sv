// Shared types and constants of the cellular H-bridge (CHB) hardware-in-the-loop
// programmable-logic design.
//
// * Q16.16 fixed point: every electrical quantity is a signed 32-bit word with
//   16 fraction bits, the number format the model is converted to before it is
//   put into hardware. Multiplication keeps 64 bits, shifts right by 16 and
//   saturates; addition saturates as well.
// * AXI4-Lite request/response bundles as packed structs, so that the same
//   bundle can be passed between the interconnects, the BRAM, the timer and the
//   model, and brought out on the top as plain ports.
// * The layout of the output record (the "simulation data" of one step) and
//   the reset values of the tunable model gains.
package hil_pkg;

  // ---------------------------------------------------------------- fixed point
  localparam int unsigned QW = 32;  // word length
  localparam int unsigned QF = 16;  // fraction length
  typedef logic signed [QW-1:0] q_t;

  localparam q_t Q_MAX = 32'sh7FFF_FFFF;
  localparam q_t Q_MIN = -32'sh7FFF_FFFF - 32'sh1;
  localparam q_t Q_THIRD = 32'sh0000_5555;  // round(65536/3)

  // saturate a 64-bit value to a Q16.16 word
  function automatic q_t q_sat64(input logic signed [63:0] v);
    if (v > 64'(Q_MAX)) return Q_MAX;
    if (v < 64'(Q_MIN)) return Q_MIN;
    return q_t'(v);
  endfunction

  function automatic q_t q_add(input q_t a, input q_t b);
    logic signed [63:0] s;
    s = 64'(a) + 64'(b);
    return q_sat64(s);
  endfunction

  function automatic q_t q_sub(input q_t a, input q_t b);
    logic signed [63:0] s;
    s = 64'(a) - 64'(b);
    return q_sat64(s);
  endfunction

  // product of two Q16.16 words, truncated toward minus infinity
  function automatic q_t q_mul(input q_t a, input q_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return q_sat64(p >>> QF);
  endfunction

  function automatic q_t q_neg(input q_t a);
    return (a == Q_MIN) ? Q_MAX : -a;
  endfunction

  // ---------------------------------------------------------------- topology
  localparam int unsigned N_PH  = 3;             // motor phases U, V, W
  localparam int unsigned N_CPP = 2;             // cells in series per phase
  localparam int unsigned N_CELLS = N_PH * N_CPP;

  // switching state of one H-bridge cell: -1, 0 or +1 (2'b11, 2'b00, 2'b01)
  typedef logic signed [1:0] sw_t;

  // inputs of one simulation step, written by software before the acknowledge
  typedef struct packed {
    q_t [2:0]          vg;      // secondary (grid) phase voltages a, b, c
    q_t [N_PH-1:0]     emf;     // motor EMF of phases U, V, W
    sw_t [N_CELLS-1:0] sw;      // switching state of each cell
    q_t                k_lt;    // dt / (2 * transformer leakage inductance)
    q_t                k_lm;    // dt / motor leakage inductance
    q_t                k_c;     // dt / DC-link capacitance
  } chb_in_t;

  // Gain reset values for dt = 3 us, L = 300 uH, C = 3 mF
  localparam q_t K_LT_RESET = 32'sd328;   // 0.005 * 65536
  localparam q_t K_LM_RESET = 32'sd655;   // 0.01  * 65536
  localparam q_t K_C_RESET  = 32'sd66;    // 0.001 * 65536

  // ---------------------------------------------------------------- record
  // word 0 step count, 1..3 motor currents, 4..6 phase voltages,
  // 7 U-V line voltage, then six words per cell.
  localparam int unsigned REC_STEP  = 0;
  localparam int unsigned REC_IM    = 1;
  localparam int unsigned REC_VPH   = 4;
  localparam int unsigned REC_VUV   = 7;
  localparam int unsigned REC_CELL  = 8;
  localparam int unsigned REC_PER_CELL = 6;  // vdc, vout, idc, ia, ib, ic
  localparam int unsigned REC_WORDS = REC_CELL + REC_PER_CELL * N_CELLS;  // 44

  // ---------------------------------------------------------------- AXI4-Lite
  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic [AXI_AW-1:0]   awaddr;
    logic                awvalid;
    logic [AXI_DW-1:0]   wdata;
    logic [AXI_DW/8-1:0] wstrb;
    logic                wvalid;
    logic                bready;
    logic [AXI_AW-1:0]   araddr;
    logic                arvalid;
    logic                rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic [1:0]        bresp;
    logic              bvalid;
    logic [AXI_DW-1:0] rdata;
    logic [1:0]        rresp;
    logic              rvalid;
    logic              arready;
  } axil_rsp_t;

  localparam axil_req_t AXIL_REQ_IDLE = '0;
  localparam axil_rsp_t AXIL_RSP_IDLE = '0;

  // step controller states
  typedef enum logic [1:0] {
    ST_IDL = 2'd0,
    ST_RUN = 2'd1,
    ST_RDY = 2'd2
  } model_state_e;

endpackage
