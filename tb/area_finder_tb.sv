// area_finder_tb: random chip states and random candidate locations on the
// default 32 x 64 state memory.  A reference first-fit search in the
// testbench decides which candidate should be found; the testbench checks
// found/found_loc/found_row/found_col, that candidates running off the
// device are never chosen, the scan time bound, and that a commit marks the
// location as used so that a second scan no longer finds it.
module area_finder_tb;
  localparam int ROWS = 32, COLS = 64, NL = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       st_wr_en = 0, st_val = 0, loc_wr_en = 0, loc_valid = 0;
  logic [4:0] st_row = 0, loc_row = 0, found_row;
  logic [5:0] st_col = 0, loc_col = 0, found_col, loc_height = 0;
  logic [6:0] loc_width = 0;
  logic [2:0] loc_idx = 0, found_loc;
  logic       scan_start = 0, busy, scan_done, found, commit = 0, commit_done;

  area_finder dut (.*);

  bit state_m [ROWS][COLS];
  int cr [NL], cc [NL], ch [NL], cw [NL];
  bit cv [NL];
  int n_found = 0, n_none = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic bit fits(input int i);
    if (!cv[i] || ch[i] == 0) return 0;
    if (cr[i] + ch[i] > ROWS || cc[i] + cw[i] > COLS) return 0;
    for (int r = cr[i]; r < cr[i] + ch[i]; r++)
      for (int c = cc[i]; c < cc[i] + cw[i]; c++)
        if (state_m[r][c]) return 0;
    return 1;
  endfunction

  task automatic set_cell(input int r, input int c, input bit v);
    st_wr_en = 1; st_row = 5'(r); st_col = 6'(c); st_val = v;
    @(negedge clk);
    st_wr_en = 0;
    state_m[r][c] = v;
  endtask

  task automatic scan(output bit f, output int loc);
    longint unsigned t0;
    scan_start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    scan_start = 0;
    while (!scan_done) @(negedge clk);
    check(cyc - t0 <= NL * ROWS + 2, "scan time bound");
    f = found; loc = int'(found_loc);
  endtask

  initial begin
    bit f;
    int loc, want;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 300; round++) begin
      // random occupation, denser in later rounds of each group of 20; the
      // state is cleared at the start of each group
      if (round % 20 == 0)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) set_cell(r, c, 1'b0);
      for (int k = 0; k < 20 + (round % 20) * 8; k++)
        set_cell($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1), $urandom_range(0, 3) != 0);
      for (int i = 0; i < NL; i++) begin
        cv[i] = ($urandom_range(0, 7) != 0);
        cr[i] = $urandom_range(0, ROWS - 1); cc[i] = $urandom_range(0, COLS - 1);
        ch[i] = $urandom_range(1, 10);       cw[i] = $urandom_range(1, 8);
        loc_wr_en = 1; loc_idx = 3'(i); loc_valid = cv[i]; loc_row = 5'(cr[i]);
        loc_col = 6'(cc[i]); loc_height = 6'(ch[i]); loc_width = 7'(cw[i]);
        @(negedge clk);
      end
      loc_wr_en = 0;
      want = -1;
      for (int i = NL - 1; i >= 0; i--) if (fits(i)) want = i;
      scan(f, loc);
      check(f == (want >= 0), $sformatf("found=%0d, reference %0d", f, want));
      if (f && want >= 0) begin
        n_found++;
        check(loc == want, $sformatf("location %0d, reference %0d", loc, want));
        check(found_row == 5'(cr[want]) && found_col == 6'(cc[want]), "found row/col");
        // commit and check that the area is now used
        commit = 1;
        @(negedge clk);
        commit = 0;
        while (!commit_done) @(negedge clk);
        for (int r = cr[want]; r < cr[want] + ch[want]; r++)
          for (int c = cc[want]; c < cc[want] + cw[want]; c++) state_m[r][c] = 1;
        check(!fits(want), "model marks the area");
        want = -1;
        for (int i = NL - 1; i >= 0; i--) if (fits(i)) want = i;
        scan(f, loc);
        check(f == (want >= 0) && (!f || loc == want), "scan after commit");
      end else begin
        n_none++;
      end
    end
    check(n_found > 0 && n_none > 0, "both outcomes seen");
    $display("found %0d, none %0d", n_found, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
