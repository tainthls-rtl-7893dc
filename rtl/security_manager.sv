// security_manager: the accelerator's central security manager.
//
// The controller reports two kinds of events, each with a small source id:
//   - a conditional FSM transition (br_valid, br_id) together with the taint
//     tag of its condition (br_tag);
//   - an external memory operation (mem_valid, mem_id) together with the taint
//     of its address, spread to one bit per address bit (mem_addr_taint).
// Policy inputs, written by software in the configuration registers:
//   br_check_all  : every tainted transition is a violation; otherwise only
//                   those whose bit is set in br_critical;
//   mem_check_mask: address bits whose taint is a violation. All ones gives
//                   strict memory protection; only the upper bits gives
//                   permissive protection (the location moved significantly);
//   mem_critical  : memory operations (pointers) whose id bit is set are
//                   critical: every address bit is checked, whatever the mask;
//   mem_benign    : memory operations whose id bit is set are never checked
//                   (benign wins over critical).
// `violation` is combinational so the controller can halt before the unsafe
// transition or memory request takes effect. The interrupt line `irq` is set on
// a violation and held, with its cause and source id, until irq_clear.
// Checks and policies follow the document; the encoding, the reading of a
// critical pointer as one checked strictly, and benign winning over critical
// are this design's own.
module security_manager
  import dift_pkg::*;
#(
  parameter int unsigned AW  = 32,
  parameter int unsigned NID = 8,
  localparam int unsigned IW = (NID > 1) ? $clog2(NID) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           br_valid,
  input  logic [IW-1:0]  br_id,
  input  logic           br_tag,
  input  logic           mem_valid,
  input  logic [IW-1:0]  mem_id,
  input  logic [AW-1:0]  mem_addr_taint,
  input  logic           br_check_all,
  input  logic [NID-1:0] br_critical,
  input  logic [AW-1:0]  mem_check_mask,
  input  logic [NID-1:0] mem_critical,
  input  logic [NID-1:0] mem_benign,
  input  logic           irq_clear,
  output logic           violation,
  output logic           irq,
  output cause_e         cause,
  output logic [IW-1:0]  cause_id
);
  logic br_viol, mem_viol;

  assign br_viol   = br_valid && br_tag && (br_check_all || br_critical[br_id]);
  assign mem_viol  = mem_valid && !mem_benign[mem_id] &&
                     ((mem_addr_taint & (mem_critical[mem_id] ? '1 : mem_check_mask)) != '0);
  assign violation = br_viol || mem_viol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq      <= 1'b0;
      cause    <= CAUSE_NONE;
      cause_id <= '0;
    end else if (violation && !irq) begin
      irq      <= 1'b1;
      cause    <= br_viol ? CAUSE_BRANCH : CAUSE_MEMORY;
      cause_id <= br_viol ? br_id : mem_id;
    end else if (irq_clear) begin
      irq      <= 1'b0;
      cause    <= CAUSE_NONE;
      cause_id <= '0;
    end
  end
endmodule
