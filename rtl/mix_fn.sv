// mix_fn: a DIFT-enhanced submodule, the hardware form of a called C function
//     uint32_t mix(uint32_t x) { return x ^ (x >> 16); }
//
// Accelerators are built hierarchically: a called function becomes a
// submodule with its own small FSM and datapath, and the caller drives it like
// any other datapath resource. With DIFT, the submodule's interface gets one
// extra tag port per parameter (x_tag) and one for the return value (ret_tag),
// and its inside gets the same shadow logic as the top: the parameter and
// return registers are taint_regs, and the shifter chained into the XOR unit
// has a shift propagation module chained into an XOR propagation module.
//
// Protocol: the caller holds x and x_tag and pulses `start` for one cycle in
// IDLE (`busy` low). The parameter is registered on start, the result is
// computed and registered in the next cycle, and `done` is high for one cycle
// in the cycle after that (two cycles after start), with ret/ret_tag valid
// from then until the next call. The function has
// no conditional transitions and no memory operations, so it reports nothing
// to the security manager. The extra tag ports and the mirrored shadow logic
// follow the document; the function, its FSM and the start/done handshake are
// this design's own.
module mix_fn
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  x,
  input  logic [TW-1:0] x_tag,
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  ret,
  output logic [TW-1:0] ret_tag
);
  typedef enum logic [1:0] {M_IDLE, M_EXEC, M_RET} mstate_e;
  mstate_e state;

  logic [W-1:0]  r_x, shr_y, xor_y;
  logic [TW-1:0] r_x_t, shr_yt, xor_yt;
  logic          we_x, we_r;

  assign we_x = (state == M_IDLE) && start;
  assign we_r = (state == M_EXEC);

  taint_reg #(.W(W), .TW(TW)) u_r_x (
    .clk, .rst_n, .we(we_x), .d(x), .dt(x_tag), .q(r_x), .qt(r_x_t));

  // shifter chained into the XOR unit, and their chained propagation modules
  assign shr_y = r_x >> (W / 2);
  pm_shift #(.GRAN(GRAN), .W(W)) u_pm_shr (
    .op(SOP_SRL), .a(r_x), .b(W'(W / 2)), .at(r_x_t), .bt(TW'(0)), .yt(shr_yt));
  assign xor_y = r_x ^ shr_y;
  pm_logic #(.GRAN(GRAN), .W(W)) u_pm_xor (
    .op(LOP_XOR), .a(r_x), .b(shr_y), .at(r_x_t), .bt(shr_yt), .yt(xor_yt));

  taint_reg #(.W(W), .TW(TW)) u_r_ret (
    .clk, .rst_n, .we(we_r), .d(xor_y), .dt(xor_yt), .q(ret), .qt(ret_tag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= M_IDLE;
    else begin
      case (state)
        M_IDLE:  if (start) state <= M_EXEC;
        M_EXEC:  state <= M_RET;
        default: state <= M_IDLE;   // M_RET
      endcase
    end
  end

  assign busy = (state != M_IDLE);
  assign done = (state == M_RET);

  // a call is only started while the submodule is idle
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
