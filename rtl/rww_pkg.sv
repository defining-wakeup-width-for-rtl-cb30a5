// rww_pkg: types and sizes shared by the Reduced Wakeup Width (RWW) scheduler.
//
// A register tag names a physical register. The processor this scheduler is sized for
// has 128 integer and 128 floating-point physical registers, so one 8-bit tag space
// covers both files (one unified tag space is this design's choice). An instruction
// window entry carries two source tags with their ready bits, the destination tag, the
// "type" bit (1 = tag-producing, 0 = branch/store or other non-tag-producing
// instruction) and an opaque payload that the scheduler hands to the functional unit
// untouched (for example a reorder-buffer index and opcode).
package rww_pkg;

  localparam int unsigned TAG_W     = 8;   // 128 Int + 128 FP physical registers
  localparam int unsigned PAYLOAD_W = 16;  // opaque instruction payload (own choice)

  typedef logic [TAG_W-1:0]     tag_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;

  // One instruction-window entry as written at dispatch.
  typedef struct packed {
    tag_t     src1;
    logic     src1_rdy;
    tag_t     src2;
    logic     src2_rdy;
    logic     produces_tag;  // the "type" bit
    tag_t     dest;
    payload_t payload;
  } iq_entry_t;

  // One tag-line: a register tag driven to the wakeup CAM of every window entry.
  typedef struct packed {
    logic valid;
    tag_t tag;
  } tagline_t;

  // An instruction handed from a tag latch to its functional unit.
  typedef struct packed {
    logic     valid;
    logic     produces_tag;
    tag_t     dest;
    payload_t payload;
  } fu_issue_t;

endpackage
