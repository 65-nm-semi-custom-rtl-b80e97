// scm_scan_if: scan-chain test interface of the memory test chip.
//
// A shift register of SCAN_LEN = 2*ADDR_W + WIDTH + 2 bits holds one memory
// access, fields from the top bit down:
//   {we, waddr, data, re, raddr}
// While `scan_en` is high the chain shifts one bit per cycle towards bit 0:
// `scan_in` enters at the top bit and `scan_out` is bit 0, so a vector is
// shifted in least significant bit first and read out the same way.
// A one-cycle `exec` pulse (with `scan_en` low) presents the access to the
// memory for exactly one cycle: `mem_we`/`mem_re` are high only in that
// cycle. One cycle later, when the memory's read data is valid, the data
// field of the chain is overwritten with `mem_rdata` if the access read;
// otherwise the chain is left unchanged. `busy` is high in that capture
// cycle, during which `scan_en` and `exec` are ignored.
// So one access costs SCAN_LEN shift cycles in, 2 cycles of execution and
// SCAN_LEN shift cycles out (the next vector can be shifted in while the
// result is shifted out).
//
// Only the existence of a scan-chain test interface is given for the chip;
// the field layout, the exec/capture protocol and the timing are this
// design's own.
module scm_scan_if #(
  parameter int unsigned WORDS    = scm_pkg::WORDS,
  parameter int unsigned WIDTH    = scm_pkg::WIDTH,
  parameter int unsigned ADDR_W   = $clog2(WORDS),
  parameter int unsigned SCAN_LEN = 2 * ADDR_W + WIDTH + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic              exec,
  output logic              scan_out,
  output logic              busy,
  // memory side
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [WIDTH-1:0]  mem_wdata,
  output logic              mem_re,
  output logic [ADDR_W-1:0] mem_raddr,
  input  logic [WIDTH-1:0]  mem_rdata
);
  localparam int unsigned RADDR_LSB = 0;
  localparam int unsigned RE_BIT    = ADDR_W;
  localparam int unsigned DATA_LSB  = ADDR_W + 1;
  localparam int unsigned WADDR_LSB = ADDR_W + 1 + WIDTH;
  localparam int unsigned WE_BIT    = 2 * ADDR_W + 1 + WIDTH;

  typedef enum logic [0:0] {S_IDLE, S_CAPTURE} state_t;

  logic [SCAN_LEN-1:0] chain;
  state_t              state;
  logic                fire;

  assign fire = (state == S_IDLE) && exec && !scan_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: begin
          if (scan_en)
            chain <= {scan_in, chain[SCAN_LEN-1:1]};
          else if (fire)
            state <= S_CAPTURE;
        end
        S_CAPTURE: begin
          if (chain[RE_BIT])
            chain[DATA_LSB +: WIDTH] <= mem_rdata;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign scan_out  = chain[0];
  assign busy      = (state == S_CAPTURE);
  assign mem_we    = fire && chain[WE_BIT];
  assign mem_re    = fire && chain[RE_BIT];
  assign mem_waddr = chain[WADDR_LSB +: ADDR_W];
  assign mem_wdata = chain[DATA_LSB +: WIDTH];
  assign mem_raddr = chain[RADDR_LSB +: ADDR_W];

  // The chain must be long enough to hold every field.
  if (SCAN_LEN != WE_BIT + 1) begin : g_len_check
    $error("scm_scan_if: SCAN_LEN must equal 2*ADDR_W + WIDTH + 2");
  end
endmodule
