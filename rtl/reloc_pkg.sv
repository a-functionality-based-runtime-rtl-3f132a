// reloc_pkg: types and constants shared by the functionality-based relocation
// system.
//
// The sizes follow the CORDIC case study: up to four circuits selected by a
// 2-bit Task ID, 8-bit circuit inputs and outputs, and an 18 kb output memory
// organised as 2048 words of 9 bits (8 output bits above one valid bit).
// The mode encoding of the memo logic, the request outcome codes and the
// field layout of a task-memory entry are this design's own choices.
package reloc_pkg;

  localparam int unsigned TASK_W = 2;              // Task ID width
  localparam int unsigned NUM_TASKS = 1 << TASK_W;
  localparam int unsigned IN_W   = 8;              // circuit input (DataIn) width
  localparam int unsigned OUT_W  = 8;              // circuit output (DataOut) width
  localparam int unsigned OM_AW  = 11;             // output memory: 2048 words ...
  localparam int unsigned OM_DW  = OUT_W + 1;      // ... of 9 bits = 18 kb
  localparam int unsigned OB_W   = $clog2(IN_W + 1);  // width of an offset-bit count

  // Operating mode of the memo logic (the "Mode" input of the output memorizer).
  typedef enum logic [1:0] {
    MODE_MEMO    = 2'd0,  // CHECK each new input, SAVE the output on a miss
    MODE_FILL    = 2'd1,  // sweep a section, have the circuit compute missing outputs
    MODE_COPY    = 2'd2,  // sweep a section, stream every word out to the template
    MODE_REFRESH = 2'd3   // sweep a section, clear every valid bit
  } memo_mode_t;

  // Outcome of a relocation request.
  typedef enum logic [2:0] {
    RES_NONE        = 3'd0,
    RES_DBR_DONE    = 3'd1,  // relocated by direct bitstream
    RES_FBR_DONE    = 3'd2,  // relocated by functionality
    RES_NOT_MEMO    = 3'd3,  // declined: FBR check failed
    RES_TOO_SLOW    = 3'd4,  // declined: duration check failed
    RES_NO_AREA     = 3'd5   // declined: area check failed
  } reloc_result_t;

  // One task-memory entry.  base is the first output-memory word of the
  // circuit, off_bits the number of address bits of its section and tol the
  // number of input LSBs dropped by the tolerance.
  typedef struct packed {
    logic        relocatable;
    logic [OM_AW-1:0] base;
    logic [OB_W-1:0]  off_bits;
    logic [OB_W-1:0]  tol;
  } task_entry_t;

  // One word on the copy stream from the output memorizer to the template.
  typedef struct packed {
    logic [TASK_W-1:0] task_id;
    logic [IN_W-1:0]   offset;
    logic [OUT_W-1:0]  data;
  } copy_word_t;

endpackage
