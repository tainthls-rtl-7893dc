// dift_accel: a DIFT-enhanced FSMD accelerator (top level).
//
// The accelerator is built the way the document builds every accelerator: a
// controller (FSM), a datapath of registers, functional units and multiplexers,
// and memory elements; next to it runs a shadow datapath that carries a taint
// tag for every value. Every datapath register is a taint_reg (value and tag
// share one write enable), every functional unit has a propagation module fed
// by the same operands, every multiplexer has a tag multiplexer on the same
// select, chained units have chained propagation modules, and the scratchpad
// has a taint memory on the same address. The controller reports each
// conditional transition with the tag of its condition, and each external
// memory request with the tag of its address, to the security manager; on a
// violation it halts before the transition or request and the security
// interrupt `irq` is raised.
//
// The kernel is this design's own example of an HLS-generated function (the
// document synthesises kernels from C and gives none of them):
//     for (i = 0; i < n; i++) buf[i] = src[i] ^ key;     // external load, SPM store
//     acc = 0; for (i = 0; i < n; i++) acc = acc * 31 + buf[i];
//     r = mix(acc); *dst = r; return r;                  // call, external store
//     with mix(x) = x ^ (x >> 16), a called function (submodule mix_fn)
// buf is the local scratchpad (DEPTH words, index i taken modulo DEPTH); src
// and dst are word addresses in external memory. Branch ids: 0 first loop, 1
// second loop. Memory ids: 0 load through src, 1 store through dst. The call
// to mix is made like any other datapath operation: the caller passes acc with
// its tag on the submodule's extra tag port and takes the return value with
// its tag.
//
// Interfaces: a configuration bus (cfg_regs; parameters, their tags, policy,
// start, status, return value and tag), the interrupt line `irq`, `done` (one
// cycle when the return value is ready), and an external memory port with
// valid/ready requests and a response valid for every request. With
// TAINT_BUS = 1 the port carries tags on ext_wtag/ext_rtag beside the data;
// with TAINT_BUS = 0 (default) a taint_serializer moves data and tags over the
// data lines alone, and ext_wtag is 0 and ext_rtag unused. The serializer
// interleaves tags with data (INTERLEAVE = 1) or keeps them in a region at
// TAG_BASE + address (INTERLEAVE = 0).
// Timing: per element, the first loop takes 4 cycles plus the external access
// (two bus transactions when serialized), the second loop 3 cycles; the call
// and the store add 5 cycles plus the store's access. Tag work never adds a
// cycle; only the serializer does.
module dift_accel
  import dift_pkg::*;
#(
  parameter gran_e       GRAN       = GRAN_BIT,
  parameter int unsigned W          = 32,
  parameter int unsigned DEPTH      = 256,
  parameter bit          TAINT_BUS  = 1'b0,
  parameter bit          SPM_SHARED = 1'b0,
  parameter bit          INTERLEAVE = 1'b1,
  parameter logic [W-1:0] TAG_BASE  = W'(1) << (W - 1),
  localparam int unsigned TW        = tag_width(GRAN, W)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration bus from the host
  input  logic          cfg_we,
  input  logic [4:0]    cfg_addr,
  input  logic [31:0]   cfg_wdata,
  output logic [31:0]   cfg_rdata,
  // interrupt lines
  output logic          irq,
  output logic          done,
  // external memory port
  output logic          ext_req_valid,
  input  logic          ext_req_ready,
  output logic          ext_we,
  output logic [W-1:0]  ext_addr,
  output logic [W-1:0]  ext_wdata,
  output logic [TW-1:0] ext_wtag,
  input  logic          ext_resp_valid,
  input  logic [W-1:0]  ext_rdata,
  input  logic [TW-1:0] ext_rtag
);
  localparam int unsigned NID = 8;
  localparam int unsigned IW  = $clog2(NID);
  localparam int unsigned SAW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam logic [W-1:0] MULC = W'(31);

  typedef enum logic [3:0] {
    S_IDLE, S_L1_CHK, S_L1_ADR, S_L1_REQ, S_L1_WT, S_L1_WR,
    S_L2_CHK, S_L2_RD, S_L2_ACC, S_FIN, S_FIN_WT, S_ST, S_ST_WT, S_DONE, S_HALT
  } state_e;
  state_e state, state_nx;

  // ---------------------------------------------------------------- config
  logic           start, irq_clear, br_check_all;
  logic [W-1:0]   src, dst, n, key, mem_check_mask;
  logic [TW-1:0]  src_t, dst_t, n_t, key_t;
  logic [NID-1:0] br_critical, mem_critical, mem_benign;
  cause_e         cause;
  logic [IW-1:0]  cause_id;
  logic           ret_we;

  // ---------------------------------------------------------------- datapath
  logic [W-1:0]  r_i, r_acc, r_v, r_addr;
  logic [TW-1:0] r_i_t, r_acc_t, r_v_t, r_addr_t;
  logic          we_i, we_acc, we_v, we_addr;
  logic          sel_i, sel_acc, sel_v;
  logic [1:0]    sel_aa, sel_ab;

  logic [W-1:0]  add_a, add_b, add_y, mul_y, xor_y, mix_ret;
  logic [TW-1:0] add_at, add_bt, add_yt, mul_yt, xor_yt, mix_ret_t;
  logic [W-1:0]  i_d, acc_d, v_d;
  logic [TW-1:0] i_dt, acc_dt, v_dt;
  logic          mix_start, mix_busy, mix_done;
  logic          lt;
  logic          lt_t;

  // memory interface (before the serializer)
  logic          mi_req_valid, mi_req_ready, mi_we, mi_resp_valid;
  logic [W-1:0]  mi_addr, mi_rdata;
  logic [TW-1:0] mi_rtag;

  // scratchpad
  logic           spm_en, spm_we;
  logic [W-1:0]   spm_rdata;
  logic [TW-1:0]  spm_rtag;

  // security manager
  logic          br_valid, br_id, mem_valid, mem_id, violation;
  logic [W-1:0]  addr_taint_bits;
  logic [TW-1:0] mem_addr_t;

  cfg_regs #(.W(W), .TW(TW), .NID(NID)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .start, .irq_clear, .src, .dst, .n, .key,
    .src_tag(src_t), .dst_tag(dst_t), .n_tag(n_t), .key_tag(key_t),
    .br_check_all, .br_critical, .mem_check_mask, .mem_critical, .mem_benign,
    .busy(state != S_IDLE), .done, .irq, .cause, .cause_id(8'(cause_id)),
    .ret_we, .ret(r_v), .ret_tag(r_v_t)
  );

  // registers with their taint registers
  taint_reg #(.W(W), .TW(TW)) u_r_i    (.clk, .rst_n, .we(we_i),    .d(i_d),   .dt(i_dt),   .q(r_i),    .qt(r_i_t));
  taint_reg #(.W(W), .TW(TW)) u_r_acc  (.clk, .rst_n, .we(we_acc),  .d(acc_d), .dt(acc_dt), .q(r_acc),  .qt(r_acc_t));
  taint_reg #(.W(W), .TW(TW)) u_r_v    (.clk, .rst_n, .we(we_v),    .d(v_d),   .dt(v_dt),   .q(r_v),    .qt(r_v_t));
  taint_reg #(.W(W), .TW(TW)) u_r_addr (.clk, .rst_n, .we(we_addr), .d(add_y), .dt(add_yt), .q(r_addr), .qt(r_addr_t));

  // register input multiplexers: constant 0 (untainted) or the adder
  tagged_mux #(.W(W), .TW(TW), .N(2)) u_mux_i (
    .sel(sel_i), .d({add_y, W'(0)}), .dt({add_yt, TW'(0)}), .y(i_d), .yt(i_dt));
  tagged_mux #(.W(W), .TW(TW), .N(2)) u_mux_acc (
    .sel(sel_acc), .d({add_y, W'(0)}), .dt({add_yt, TW'(0)}), .y(acc_d), .yt(acc_dt));
  tagged_mux #(.W(W), .TW(TW), .N(2)) u_mux_v (
    .sel(sel_v), .d({mix_ret, xor_y}), .dt({mix_ret_t, xor_yt}), .y(v_d), .yt(v_dt));

  // shared adder: operand multiplexer trees and their shadow trees
  tagged_mux #(.W(W), .TW(TW), .N(3)) u_mux_aa (
    .sel(sel_aa), .d({mul_y, r_i, src}), .dt({mul_yt, r_i_t, src_t}), .y(add_a), .yt(add_at));
  tagged_mux #(.W(W), .TW(TW), .N(3)) u_mux_ab (
    .sel(sel_ab), .d({spm_rdata, W'(1), r_i}), .dt({spm_rtag, TW'(0), r_i_t}), .y(add_b), .yt(add_bt));
  assign add_y = add_a + add_b;
  pm_add #(.GRAN(GRAN), .W(W)) u_pm_add (
    .sub(1'b0), .a(add_a), .b(add_b), .at(add_at), .bt(add_bt), .yt(add_yt));

  // multiplier by the constant 31, chained into the adder
  assign mul_y = r_acc * MULC;
  pm_mul #(.GRAN(GRAN), .W(W)) u_pm_mul (
    .a(r_acc), .b(MULC), .at(r_acc_t), .bt(TW'(0)), .yt(mul_yt));

  // XOR unit: loaded word ^ key
  assign xor_y = mi_rdata ^ key;
  pm_logic #(.GRAN(GRAN), .W(W)) u_pm_xor (
    .op(LOP_XOR), .a(mi_rdata), .b(key), .at(mi_rtag), .bt(key_t), .yt(xor_yt));

  // called function mix(acc): submodule with tag ports for its parameter and
  // its return value
  mix_fn #(.GRAN(GRAN), .W(W)) u_mix (
    .clk, .rst_n, .start(mix_start), .x(r_acc), .x_tag(r_acc_t),
    .busy(mix_busy), .done(mix_done), .ret(mix_ret), .ret_tag(mix_ret_t));

  // loop comparator i < n; its tag goes to the controller
  assign lt = r_i < n;
  pm_cmp #(.GRAN(GRAN), .W(W)) u_pm_cmp (
    .op(COP_LTU), .a(r_i), .b(n), .at(r_i_t), .bt(n_t), .yt(lt_t));

  // ---------------------------------------------------------------- memories
  taint_spm #(.W(W), .TW(TW), .DEPTH(DEPTH), .SHARED(SPM_SHARED)) u_spm (
    .clk, .en(spm_en), .we(spm_we), .addr(r_i[SAW-1:0]),
    .wdata(r_v), .wtag(r_v_t), .rdata(spm_rdata), .rtag(spm_rtag));

  assign mi_addr    = (state == S_ST) ? dst   : r_addr;
  assign mem_addr_t = (state == S_ST) ? dst_t : r_addr_t;

  if (TAINT_BUS) begin : g_taint_bus
    assign ext_req_valid = mi_req_valid;
    assign mi_req_ready  = ext_req_ready;
    assign ext_we        = mi_we;
    assign ext_addr      = mi_addr;
    assign ext_wdata     = r_v;
    assign ext_wtag      = r_v_t;
    assign mi_resp_valid = ext_resp_valid;
    assign mi_rdata      = ext_rdata;
    assign mi_rtag       = ext_rtag;
  end else begin : g_serial
    taint_serializer #(.W(W), .TW(TW), .AW(W), .INTERLEAVE(INTERLEAVE), .TAG_BASE(TAG_BASE)) u_ser (
      .clk, .rst_n,
      .req_valid(mi_req_valid), .req_ready(mi_req_ready), .req_we(mi_we),
      .req_addr(mi_addr), .req_wdata(r_v), .req_wtag(r_v_t),
      .resp_valid(mi_resp_valid), .resp_rdata(mi_rdata), .resp_rtag(mi_rtag),
      .bus_req_valid(ext_req_valid), .bus_req_ready(ext_req_ready), .bus_we(ext_we),
      .bus_addr(ext_addr), .bus_wdata(ext_wdata),
      .bus_resp_valid(ext_resp_valid), .bus_rdata(ext_rdata));
    assign ext_wtag = '0;
    logic unused_rtag;
    assign unused_rtag = ^ext_rtag;
  end

  // ---------------------------------------------------------------- security
  tag_expand #(.GRAN(GRAN), .W(W)) u_addr_exp (.tag(mem_addr_t), .mask(addr_taint_bits));

  security_manager #(.AW(W), .NID(NID)) u_sec (
    .clk, .rst_n,
    .br_valid, .br_id(IW'(br_id)), .br_tag(lt_t),
    .mem_valid, .mem_id(IW'(mem_id)), .mem_addr_taint(addr_taint_bits),
    .br_check_all, .br_critical, .mem_check_mask, .mem_critical, .mem_benign,
    .irq_clear, .violation, .irq, .cause, .cause_id);

  // ---------------------------------------------------------------- controller
  always_comb begin
    state_nx     = state;
    we_i = 1'b0; we_acc = 1'b0; we_v = 1'b0; we_addr = 1'b0;
    sel_i = 1'b1; sel_acc = 1'b1; sel_aa = 2'd1; sel_ab = 2'd1;
    sel_v = 1'b0; mix_start = 1'b0;
    spm_en = 1'b0; spm_we = 1'b0;
    mi_req_valid = 1'b0; mi_we = 1'b0;
    br_valid = 1'b0; br_id = 1'b0; mem_valid = 1'b0; mem_id = 1'b0;
    ret_we = 1'b0; done = 1'b0;
    case (state)
      S_IDLE: if (start) begin
        we_i = 1'b1; sel_i = 1'b0;           // i = 0
        we_acc = 1'b1; sel_acc = 1'b0;       // acc = 0
        state_nx = S_L1_CHK;
      end
      S_L1_CHK: begin
        br_valid = 1'b1; br_id = 1'b0;
        if (violation)  state_nx = S_HALT;
        else if (lt)    state_nx = S_L1_ADR;
        else begin
          we_i = 1'b1; sel_i = 1'b0;         // i = 0 for the second loop
          state_nx = S_L2_CHK;
        end
      end
      S_L1_ADR: begin                        // addr = src + i
        sel_aa = 2'd0; sel_ab = 2'd0; we_addr = 1'b1;
        state_nx = S_L1_REQ;
      end
      S_L1_REQ: begin
        mem_valid = 1'b1; mem_id = 1'b0;
        if (violation) state_nx = S_HALT;
        else begin
          mi_req_valid = 1'b1;
          if (mi_req_ready) state_nx = S_L1_WT;
        end
      end
      S_L1_WT: if (mi_resp_valid) begin      // v = src[i] ^ key
        sel_v = 1'b0; we_v = 1'b1;
        state_nx = S_L1_WR;
      end
      S_L1_WR: begin                         // buf[i] = v; i = i + 1
        spm_en = 1'b1; spm_we = 1'b1;
        sel_aa = 2'd1; sel_ab = 2'd1; we_i = 1'b1; sel_i = 1'b1;
        state_nx = S_L1_CHK;
      end
      S_L2_CHK: begin
        br_valid = 1'b1; br_id = 1'b1;
        if (violation)  state_nx = S_HALT;
        else if (lt)    state_nx = S_L2_RD;
        else            state_nx = S_FIN;
      end
      S_L2_RD: begin                         // read buf[i]; i = i + 1
        spm_en = 1'b1;
        sel_aa = 2'd1; sel_ab = 2'd1; we_i = 1'b1; sel_i = 1'b1;
        state_nx = S_L2_ACC;
      end
      S_L2_ACC: begin                        // acc = acc * 31 + buf[i]
        sel_aa = 2'd2; sel_ab = 2'd2; we_acc = 1'b1; sel_acc = 1'b1;
        state_nx = S_L2_CHK;
      end
      S_FIN: if (!mix_busy) begin            // call mix(acc)
        mix_start = 1'b1;
        state_nx = S_FIN_WT;
      end
      S_FIN_WT: if (mix_done) begin          // r = mix(acc)
        sel_v = 1'b1; we_v = 1'b1;
        state_nx = S_ST;
      end
      S_ST: begin                            // *dst = r
        mem_valid = 1'b1; mem_id = 1'b1;
        if (violation) state_nx = S_HALT;
        else begin
          mi_req_valid = 1'b1; mi_we = 1'b1;
          if (mi_req_ready) state_nx = S_ST_WT;
        end
      end
      S_ST_WT: if (mi_resp_valid) state_nx = S_DONE;
      S_DONE: begin
        ret_we = 1'b1; done = 1'b1;
        state_nx = S_IDLE;
      end
      S_HALT: if (irq_clear) state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  // the interrupt line is up whenever the controller is halted
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_HALT) |-> irq);
endmodule
