// memo_logic: control of the output memorizer.
//
// The memo logic turns a circuit's raw input into an output-memory address,
// Base_Addr + offset, where Base_Addr comes from the task memory and the
// offset is the input with its tolerance LSBs dropped.  Because every input
// owns one word, a lookup takes a fixed number of cycles instead of a search.
//
// Modes (sampled together with `start`):
//   MODE_MEMO    `start` marks a new input to the circuit.  CHECK: the word
//                is read and its valid bit tested; chk_done/hit/out_data
//                are registered 3 cycles after start.  On a miss the logic
//                waits for the circuit's done and then SAVEs {output, 1'b1}
//                in 2 cycles (save_done is high 2 cycles after the app_done
//                cycle).  A new start is accepted in the second SAVE cycle.
//   MODE_FILL    sweeps the task's section; for each word whose valid bit is
//                '0' the offset is turned back into an input, sent to the
//                circuit (fill_start/fill_data, combinational) and the result
//                is written with its valid bit in the circuit's done cycle.
//                The sweep is pipelined: while the circuit computes one
//                missing output, the section is read on, one word a cycle,
//                to find the next one, which is started in the same done
//                cycle.  A FILL thus costs about sum(e) over the missing
//                outputs, plus one cycle per memorized word not hidden
//                behind a computation.
//   MODE_COPY    sweeps the section and streams every word out on a
//                valid/ready stream (copy_valid/copy_ready/copy_word).
//   MODE_REFRESH clears every valid bit of the section, one word a cycle,
//                e.g. after the circuit was changed by partial reconfiguration.
// sweep_done pulses at the end of a FILL, COPY or REFRESH sweep.
//
// The memo logic also keeps, per task, the number of missing outputs: a
// REFRESH sets it to the section size and every SAVE decrements it.  It is
// read through missing_task/missing_cnt and is the n of the duration check.
//
// From the design description: the address formation, the 3-cycle CHECK and
// 2-cycle SAVE, the valid bit in the LSB, the sweep over the valid bits to
// compute missing outputs and the refresh of the valid bits.  This design's
// own choices: the state encoding, the pipelined FILL, the copy stream and
// its handshake, the missing-output counters, and that a CHECK on a task
// whose entry is not marked relocatable is ignored.
module memo_logic
  import reloc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  memo_mode_t         mode,
  input  logic               start,
  input  logic [TASK_W-1:0]  task_id,
  input  task_entry_t        entry,       // task-memory entry of task_id
  input  logic [IN_W-1:0]    data_in,     // circuit input (MODE_MEMO)
  output logic               busy,
  // circuit outputs
  input  logic               app_done,
  input  logic [OUT_W-1:0]   app_dout,
  // CHECK / SAVE results
  output logic               chk_done,
  output logic               hit,
  output logic [OUT_W-1:0]   out_data,
  output logic               save_done,
  // requests to the circuit while filling
  output logic               fill_start,
  output logic [IN_W-1:0]    fill_data,
  // copy stream
  output logic               copy_valid,
  input  logic               copy_ready,
  output copy_word_t         copy_word,
  output logic               sweep_done,
  // missing-output count
  input  logic [TASK_W-1:0]  missing_task,
  output logic [IN_W:0]      missing_cnt,
  // output memory
  output logic               om_we,
  output logic [OM_AW-1:0]   om_waddr,
  output logic [OM_DW-1:0]   om_wdata,
  output logic [OM_AW-1:0]   om_raddr,
  input  logic [OM_DW-1:0]   om_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHK_RD, S_CHK_EV, S_WAIT_APP, S_SAVE,
    S_SW_RD, S_SW_EV, S_FILL, S_COPY, S_REF
  } state_t;

  state_t              state;
  logic [TASK_W-1:0]   task_q;
  logic [OB_W-1:0]     tol_q;
  logic [IN_W-1:0]     off_q;
  logic [IN_W-1:0]     last_q;
  logic [OM_AW-1:0]    addr_q;
  logic [OUT_W-1:0]    save_data_q;
  logic                app_seen_q;
  logic [OUT_W-1:0]    app_dout_q;
  logic [OUT_W-1:0]    copy_data_q;
  logic [IN_W:0]       missing_q [NUM_TASKS];
  // FILL pipeline: scan ahead for the next missing word while the circuit
  // computes the current one
  logic [IN_W-1:0]     scan_off_q;   // next offset to read
  logic                scan_end_q;   // every offset has been read
  logic                rd_vld_q;     // a read was issued last cycle ...
  logic [IN_W-1:0]     rd_off_q;     // ... for this offset
  logic                cand_vld_q;   // missing word waiting for the circuit
  logic [IN_W-1:0]     cand_off_q;
  logic                run_q;        // circuit computing a missing word ...
  logic [IN_W-1:0]     run_off_q;    // ... for this offset
  logic                rd_missing;
  logic                issue_rd;
  logic                fill_go;
  logic                fill_wr;

  logic [IN_W-1:0]     in_off;
  logic                memo_start;
  logic                last_word;

  assign in_off     = data_in >> entry.tol;
  assign memo_start = start && (mode == MODE_MEMO) && entry.relocatable;
  assign last_word  = (off_q == last_q);

  assign busy        = (state != S_IDLE);

  assign rd_missing = (state == S_FILL) && rd_vld_q && !om_rdata[0];
  assign issue_rd   = (state == S_FILL) && !scan_end_q && !cand_vld_q && !rd_missing;
  assign fill_go    = (state == S_FILL) && cand_vld_q && (!run_q || app_done);
  assign fill_wr    = (state == S_FILL) && run_q && app_done;
  assign fill_start = fill_go;
  assign fill_data  = cand_off_q << tol_q;
  assign missing_cnt = missing_q[missing_task];

  // Output-memory ports.
  always_comb begin
    om_raddr = addr_q;
    om_we    = 1'b0;
    om_waddr = addr_q;
    om_wdata = {save_data_q, 1'b1};
    if (state == S_SAVE) om_we = 1'b1;
    if (state == S_FILL) begin
      // addr_q holds the section base during a FILL
      om_raddr = addr_q + OM_AW'(scan_off_q);
      om_we    = fill_wr;
      om_waddr = addr_q + OM_AW'(run_off_q);
      om_wdata = {app_dout, 1'b1};
    end
    if (state == S_REF) begin
      om_we    = 1'b1;
      om_wdata = '0;
    end
  end

  assign copy_valid = (state == S_COPY);
  assign copy_word  = '{task_id: task_q, offset: off_q, data: copy_data_q};

  // Start a CHECK of the current input.
  function automatic logic [OM_AW-1:0] check_addr();
    return entry.base + OM_AW'(in_off);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      task_q      <= '0;
      tol_q       <= '0;
      off_q       <= '0;
      last_q      <= '0;
      addr_q      <= '0;
      save_data_q <= '0;
      app_seen_q  <= 1'b0;
      app_dout_q  <= '0;
      copy_data_q <= '0;
      chk_done    <= 1'b0;
      hit         <= 1'b0;
      out_data    <= '0;
      save_done   <= 1'b0;
      sweep_done  <= 1'b0;
      scan_off_q  <= '0;
      scan_end_q  <= 1'b0;
      rd_vld_q    <= 1'b0;
      rd_off_q    <= '0;
      cand_vld_q  <= 1'b0;
      cand_off_q  <= '0;
      run_q       <= 1'b0;
      run_off_q   <= '0;
      for (int i = 0; i < NUM_TASKS; i++) missing_q[i] <= '0;
    end else begin
      chk_done   <= 1'b0;
      save_done  <= 1'b0;
      sweep_done <= 1'b0;

      // Remember a circuit result that arrives while the CHECK is running.
      if (app_done && state inside {S_CHK_RD, S_CHK_EV}) begin
        app_seen_q <= 1'b1;
        app_dout_q <= app_dout;
      end

      unique case (state)
        S_IDLE: begin
          if (memo_start) begin
            addr_q     <= check_addr();
            task_q     <= task_id;
            app_seen_q <= 1'b0;
            state      <= S_CHK_RD;
          end else if (start && mode != MODE_MEMO) begin
            task_q <= task_id;
            tol_q  <= entry.tol;
            off_q  <= '0;
            last_q <= IN_W'((1 << entry.off_bits) - 1);
            addr_q <= entry.base;
            scan_off_q <= '0;
            scan_end_q <= 1'b0;
            rd_vld_q   <= 1'b0;
            cand_vld_q <= 1'b0;
            run_q      <= 1'b0;
            state  <= (mode == MODE_REFRESH) ? S_REF :
                      (mode == MODE_FILL)    ? S_FILL : S_SW_RD;
          end
        end

        // ---------------- CHECK (3 cycles) ----------------
        S_CHK_RD: state <= S_CHK_EV;            // memory reads addr_q

        S_CHK_EV: begin                         // valid bit available
          chk_done <= 1'b1;
          hit      <= om_rdata[0];
          out_data <= om_rdata[OM_DW-1:1];
          state    <= om_rdata[0] ? S_IDLE : S_WAIT_APP;
        end

        // ---------------- SAVE (2 cycles) ----------------
        S_WAIT_APP: begin
          if (app_seen_q || app_done) begin
            save_data_q <= app_seen_q ? app_dout_q : app_dout;
            app_seen_q  <= 1'b0;
            state       <= S_SAVE;
          end
        end

        S_SAVE: begin                           // memory writes addr_q
          save_done         <= 1'b1;
          missing_q[task_q] <= missing_q[task_q] - 1'b1;
          if (memo_start) begin
            addr_q     <= check_addr();
            task_q     <= task_id;
            app_seen_q <= 1'b0;
            state      <= S_CHK_RD;
          end else begin
            state <= S_IDLE;
          end
        end

        // ---------------- sweeps ----------------
        S_SW_RD: state <= S_SW_EV;

        S_SW_EV: begin
          copy_data_q <= om_rdata[OM_DW-1:1];
          state       <= S_COPY;
        end

        // FILL: one read a cycle until a missing word is found; it waits in
        // cand_* until the circuit is free (or finishes in this cycle), and
        // the result is written in the circuit's done cycle.
        S_FILL: begin
          rd_vld_q <= issue_rd;
          if (issue_rd) begin
            rd_off_q   <= scan_off_q;
            scan_off_q <= scan_off_q + 1'b1;
            if (scan_off_q == last_q) scan_end_q <= 1'b1;
          end
          if (rd_missing) begin
            cand_vld_q <= 1'b1;
            cand_off_q <= rd_off_q;
          end else if (fill_go) begin
            cand_vld_q <= 1'b0;
          end
          if (fill_go) begin
            run_q     <= 1'b1;
            run_off_q <= cand_off_q;
          end else if (fill_wr) begin
            run_q <= 1'b0;
          end
          if (fill_wr) begin
            save_done         <= 1'b1;
            missing_q[task_q] <= missing_q[task_q] - 1'b1;
          end
          if (scan_end_q && !rd_vld_q && !cand_vld_q && !run_q) begin
            sweep_done <= 1'b1;
            state      <= S_IDLE;
          end
        end

        S_COPY: begin
          if (copy_ready) begin
            if (last_word) begin
              sweep_done <= 1'b1;
              state      <= S_IDLE;
            end else begin
              off_q  <= off_q + 1'b1;
              addr_q <= addr_q + 1'b1;
              state  <= S_SW_RD;
            end
          end
        end

        S_REF: begin
          if (last_word) begin
            missing_q[task_q] <= (IN_W + 1)'(last_q) + 1'b1;
            sweep_done        <= 1'b1;
            state             <= S_IDLE;
          end else begin
            off_q  <= off_q + 1'b1;
            addr_q <= addr_q + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A copy word must stay on the stream until it is taken.
  property p_copy_stable;
    @(posedge clk) disable iff (!rst_n)
      copy_valid && !copy_ready |=> copy_valid && $stable(copy_word);
  endproperty
  a_copy_stable: assert property (p_copy_stable);

  // A sweep is only started when the memo logic is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start && mode != MODE_MEMO |-> state == S_IDLE);

endmodule
