// area_finder: looks for a free place on the chip for the memory template.
//
// The State Memory holds an M x N bit matrix, one bit per reconfigurable
// resource (row, column) of the device: '0' for a free resource, '1' for a
// used or damaged one.  A second memory lists the candidate locations at
// which the pre-synthesized template bitstream can be placed, each as a
// rectangle (row, col, height, width).  The scan checks the candidates in
// order and reports the first one whose resources are all free.  A commit
// marks the resources of the location found as used.
//
// Interface: a cell write port to the state memory (mark damage, usage or
// release), a write port to the candidate memory, scan_start ->
// scan_done/found/found_loc/found_row/found_col, and commit -> commit_done.
// Timing: the scan reads one row of the state memory a cycle, so a
// candidate of height h costs h cycles (fewer if it is rejected early), an
// invalid candidate one cycle, plus one final cycle; a commit costs h + 1
// cycles.  Start commands are honoured only when busy is low.
// From the design description: the state memory with its '0'/'1' encoding,
// the memory of potential template locations and the scan of the candidates
// against the state.  The row-at-a-time scan, the rectangle format of a
// candidate, first-fit order and the commit are this design's own choices.
module area_finder #(
  parameter int unsigned ROWS     = 32,   // M
  parameter int unsigned COLS     = 64,   // N
  parameter int unsigned NUM_LOCS = 8,    // candidate locations
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned CW = $clog2(COLS),
  localparam int unsigned LW = $clog2(NUM_LOCS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // state memory cell write port
  input  logic          st_wr_en,
  input  logic [RW-1:0] st_row,
  input  logic [CW-1:0] st_col,
  input  logic          st_val,
  // candidate location write port
  input  logic          loc_wr_en,
  input  logic [LW-1:0] loc_idx,
  input  logic          loc_valid,
  input  logic [RW-1:0] loc_row,
  input  logic [CW-1:0] loc_col,
  input  logic [RW:0]   loc_height,
  input  logic [CW:0]   loc_width,
  // scan
  input  logic          scan_start,
  output logic          busy,
  output logic          scan_done,
  output logic          found,
  output logic [LW-1:0] found_loc,
  output logic [RW-1:0] found_row,
  output logic [CW-1:0] found_col,
  // commit of the location found
  input  logic          commit,
  output logic          commit_done
);

  typedef struct packed {
    logic          valid;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
    logic [RW:0]   height;
    logic [CW:0]   width;
  } loc_t;

  typedef enum logic [1:0] {A_IDLE, A_SCAN, A_COMMIT} astate_t;

  logic [COLS-1:0] state_mem [ROWS];
  loc_t            loc_mem   [NUM_LOCS];

  astate_t         st;
  logic [LW-1:0]   li_q;        // candidate being checked
  logic [RW:0]     r_q;         // row within the candidate
  loc_t            cand;
  logic [COLS-1:0] col_mask;
  logic [RW:0]     abs_row;
  logic            row_busy;
  logic            last_row;
  logic            last_loc;

  assign cand     = loc_mem[li_q];
  assign col_mask = COLS'((((COLS + 1)'(1) << cand.width) - 1'b1) << cand.col);
  assign abs_row  = (RW + 1)'(cand.row) + r_q;
  // rows that fall outside the device count as occupied
  assign row_busy = (abs_row >= (RW + 1)'(ROWS)) ||
                    ((state_mem[abs_row[RW-1:0]] & col_mask) != '0) ||
                    ((CW + 2)'(cand.col) + (CW + 2)'(cand.width) > (CW + 2)'(COLS));
  assign last_row = (r_q + 1'b1 >= cand.height);
  assign last_loc = (li_q == LW'(NUM_LOCS - 1));
  assign busy     = (st != A_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++) state_mem[i] <= '0;
      for (int i = 0; i < NUM_LOCS; i++) loc_mem[i] <= '0;
      st          <= A_IDLE;
      li_q        <= '0;
      r_q         <= '0;
      scan_done   <= 1'b0;
      found       <= 1'b0;
      found_loc   <= '0;
      found_row   <= '0;
      found_col   <= '0;
      commit_done <= 1'b0;
    end else begin
      scan_done   <= 1'b0;
      commit_done <= 1'b0;
      if (st_wr_en) state_mem[st_row][st_col] <= st_val;
      if (loc_wr_en)
        loc_mem[loc_idx] <= '{valid: loc_valid, row: loc_row, col: loc_col,
                              height: loc_height, width: loc_width};

      unique case (st)
        A_IDLE: begin
          if (scan_start) begin
            st    <= A_SCAN;
            li_q  <= '0;
            r_q   <= '0;
            found <= 1'b0;
          end else if (commit && found) begin
            st   <= A_COMMIT;
            li_q <= found_loc;
            r_q  <= '0;
          end
        end

        A_SCAN: begin
          if (!cand.valid || cand.height == '0 || row_busy) begin
            // candidate rejected: go to the next one
            r_q <= '0;
            if (last_loc) begin
              st        <= A_IDLE;
              scan_done <= 1'b1;
            end else begin
              li_q <= li_q + 1'b1;
            end
          end else if (last_row) begin
            st        <= A_IDLE;
            scan_done <= 1'b1;
            found     <= 1'b1;
            found_loc <= li_q;
            found_row <= cand.row;
            found_col <= cand.col;
          end else begin
            r_q <= r_q + 1'b1;
          end
        end

        A_COMMIT: begin
          state_mem[abs_row[RW-1:0]] <= state_mem[abs_row[RW-1:0]] | col_mask;
          if (last_row) begin
            st          <= A_IDLE;
            commit_done <= 1'b1;
          end else begin
            r_q <= r_q + 1'b1;
          end
        end

        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
