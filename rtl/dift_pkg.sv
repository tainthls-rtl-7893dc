// dift_pkg: types, constants and helper functions shared by the DIFT-enhanced
// accelerator and its taint library.
//
// A taint tag covers a data word at one of three granularities: one tag bit per
// data bit (GRAN_BIT), one per byte (GRAN_BYTE) or one per variable (GRAN_VAR).
// tag_width() gives the tag width for a data width; expand_tag() turns a tag into
// a per-bit mask and reduce_tag() folds a per-bit mask back into a tag (a group is
// tainted when any of its bits is). The three granularities follow the document;
// the encodings, register map and the helpers are this design's own.
package dift_pkg;

  typedef enum logic [1:0] {
    GRAN_BIT  = 2'd0,
    GRAN_BYTE = 2'd1,
    GRAN_VAR  = 2'd2
  } gran_e;

  // Operation selects of the logic and shift propagation modules.
  typedef enum logic [1:0] {
    LOP_AND = 2'd0,
    LOP_OR  = 2'd1,
    LOP_XOR = 2'd2
  } logic_op_e;

  typedef enum logic [1:0] {
    SOP_SLL = 2'd0,
    SOP_SRL = 2'd1
  } shift_op_e;

  // Comparison kinds (unsigned).
  typedef enum logic [1:0] {
    COP_EQ  = 2'd0,
    COP_NE  = 2'd1,
    COP_LTU = 2'd2,
    COP_GEU = 2'd3
  } cmp_op_e;

  // Security violation causes reported by the security manager.
  typedef enum logic [1:0] {
    CAUSE_NONE   = 2'd0,
    CAUSE_BRANCH = 2'd1,
    CAUSE_MEMORY = 2'd2
  } cause_e;

  // Configuration register map (word addresses on the configuration bus).
  localparam int unsigned REG_CTRL      = 0;   // W: bit0 start, bit1 clear interrupt
  localparam int unsigned REG_STATUS    = 1;   // R: bit0 busy, bit1 done, bit2 irq, [5:4] cause, [15:8] source id
  localparam int unsigned REG_SRC       = 2;   // pointer to the input array in external memory
  localparam int unsigned REG_DST       = 3;   // pointer to the output word in external memory
  localparam int unsigned REG_N         = 4;   // number of elements
  localparam int unsigned REG_KEY       = 5;   // key value
  localparam int unsigned REG_RET       = 6;   // R: return value
  localparam int unsigned REG_SRC_TAG   = 8;   // taint tags of the parameters
  localparam int unsigned REG_DST_TAG   = 9;
  localparam int unsigned REG_N_TAG     = 10;
  localparam int unsigned REG_KEY_TAG   = 11;
  localparam int unsigned REG_RET_TAG   = 12;  // R: taint tag of the return value
  localparam int unsigned REG_BR_POL    = 16;  // bit0 check every transition, [15:8] critical mask
  localparam int unsigned REG_MEM_POL   = 17;  // checked address bits (all ones = strict)
  localparam int unsigned REG_MEM_BENIGN= 18;  // bit k set: pointer k is benign, never checked
  localparam int unsigned REG_MEM_CRIT  = 19;  // bit k set: pointer k is critical, every address bit checked

  function automatic int unsigned tag_width(gran_e g, int unsigned w);
    case (g)
      GRAN_BIT:  return w;
      GRAN_BYTE: return (w + 7) / 8;
      default:   return 1;
    endcase
  endfunction

  // Number of data bits covered by one tag bit.
  function automatic int unsigned group_size(gran_e g, int unsigned w);
    case (g)
      GRAN_BIT:  return 1;
      GRAN_BYTE: return 8;
      default:   return w;
    endcase
  endfunction

endpackage
