// cfg_regs: memory-mapped configuration registers of the DIFT-enhanced
// accelerator, with the extra taint tag registers of its parameters and of its
// return value.
//
// The host writes the parameters (pointers src and dst, element count n, key),
// one taint tag per parameter with extra writes, and the security policy, then
// writes CTRL.start. It reads STATUS, the return value and the return tag. The
// parameter and return tags reset to all ones, so an accelerator that is used
// without setting them treats its inputs as tainted. Register map in dift_pkg.
// Configuration bus: cfg_we with cfg_addr/cfg_wdata writes at the clock edge;
// cfg_rdata is the combinational read of cfg_addr. start and irq_clear are
// one-cycle pulses. The tag registers and their reset to ones follow the
// document; the map, the policy reset values (check every tainted transition,
// strict memory protection, no benign or critical pointer) and the bus are
// this design's own.
module cfg_regs
  import dift_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned TW  = 32,
  parameter int unsigned NID = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration bus
  input  logic           cfg_we,
  input  logic [4:0]     cfg_addr,
  input  logic [31:0]    cfg_wdata,
  output logic [31:0]    cfg_rdata,
  // to the accelerator
  output logic           start,
  output logic           irq_clear,
  output logic [W-1:0]   src,
  output logic [W-1:0]   dst,
  output logic [W-1:0]   n,
  output logic [W-1:0]   key,
  output logic [TW-1:0]  src_tag,
  output logic [TW-1:0]  dst_tag,
  output logic [TW-1:0]  n_tag,
  output logic [TW-1:0]  key_tag,
  output logic           br_check_all,
  output logic [NID-1:0] br_critical,
  output logic [W-1:0]   mem_check_mask,
  output logic [NID-1:0] mem_critical,
  output logic [NID-1:0] mem_benign,
  // from the accelerator
  input  logic           busy,
  input  logic           done,
  input  logic           irq,
  input  cause_e         cause,
  input  logic [7:0]     cause_id,
  input  logic           ret_we,
  input  logic [W-1:0]   ret,
  input  logic [TW-1:0]  ret_tag
);
  logic [W-1:0]  ret_q;
  logic [TW-1:0] ret_tag_q;
  logic          done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; n <= '0; key <= '0;
      src_tag <= '1; dst_tag <= '1; n_tag <= '1; key_tag <= '1;
      ret_q <= '0; ret_tag_q <= '1; done_q <= 1'b0;
      br_check_all   <= 1'b1;
      br_critical    <= '1;
      mem_check_mask <= '1;
      mem_critical   <= '0;
      mem_benign     <= '0;
      start          <= 1'b0;
      irq_clear      <= 1'b0;
    end else begin
      start     <= 1'b0;
      irq_clear <= 1'b0;
      if (ret_we) begin
        ret_q     <= ret;
        ret_tag_q <= ret_tag;
      end
      if (done)  done_q <= 1'b1;
      if (cfg_we) begin
        case (int'(cfg_addr))
          REG_CTRL: begin
            start     <= cfg_wdata[0];
            irq_clear <= cfg_wdata[1];
            if (cfg_wdata[0]) done_q <= 1'b0;
          end
          REG_SRC:        src            <= W'(cfg_wdata);
          REG_DST:        dst            <= W'(cfg_wdata);
          REG_N:          n              <= W'(cfg_wdata);
          REG_KEY:        key            <= W'(cfg_wdata);
          REG_SRC_TAG:    src_tag        <= TW'(cfg_wdata);
          REG_DST_TAG:    dst_tag        <= TW'(cfg_wdata);
          REG_N_TAG:      n_tag          <= TW'(cfg_wdata);
          REG_KEY_TAG:    key_tag        <= TW'(cfg_wdata);
          REG_BR_POL: begin
            br_check_all <= cfg_wdata[0];
            br_critical  <= NID'(cfg_wdata[15:8]);
          end
          REG_MEM_POL:    mem_check_mask <= W'(cfg_wdata);
          REG_MEM_BENIGN: mem_benign     <= NID'(cfg_wdata);
          REG_MEM_CRIT:   mem_critical   <= NID'(cfg_wdata);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (int'(cfg_addr))
      REG_STATUS:     cfg_rdata = {16'd0, cause_id, 2'd0, 2'(cause), 1'b0, irq, done_q, busy};
      REG_SRC:        cfg_rdata = 32'(src);
      REG_DST:        cfg_rdata = 32'(dst);
      REG_N:          cfg_rdata = 32'(n);
      REG_KEY:        cfg_rdata = 32'(key);
      REG_RET:        cfg_rdata = 32'(ret_q);
      REG_SRC_TAG:    cfg_rdata = 32'(src_tag);
      REG_DST_TAG:    cfg_rdata = 32'(dst_tag);
      REG_N_TAG:      cfg_rdata = 32'(n_tag);
      REG_KEY_TAG:    cfg_rdata = 32'(key_tag);
      REG_RET_TAG:    cfg_rdata = 32'(ret_tag_q);
      REG_BR_POL:     cfg_rdata = {16'd0, 8'(br_critical), 7'd0, br_check_all};
      REG_MEM_POL:    cfg_rdata = 32'(mem_check_mask);
      REG_MEM_BENIGN: cfg_rdata = 32'(mem_benign);
      REG_MEM_CRIT:   cfg_rdata = 32'(mem_critical);
      default:        cfg_rdata = '0;
    endcase
  end
endmodule
