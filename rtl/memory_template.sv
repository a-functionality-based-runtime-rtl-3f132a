// memory_template: the relocated equivalent of the memorized circuits.
//
// Instead of the original logic, a generic memory holds every output the
// circuits can produce, addressed by the collected inputs ({Task ID,
// offset}); a delay-management block then raises done at the same cycle
// the original circuit would, so that the rest of the system keeps its
// timing.  The memory is filled with the words memorized by the output
// memorizer when the circuit is relocated.
//
// Interface: wr_en/wr_addr/wr_data fill the memory; lat_wr_en/lat_task/
// lat_val set the latency, in cycles, of the original circuit of each task;
// start/task_id/offset present an input and done/data_out give the result.
// Timing: the memory read itself takes 2 cycles (address register, then the
// registered read); done is high for one cycle max(2, latency) cycles after
// start, with data_out valid from then until the next start.  One
// computation is in flight at a time; a start while busy is ignored.
// From the design description: a memory addressed by the inputs, a 2-cycle
// memory delay and a delay block that postpones done by the difference in
// latency.  The per-task latency table and the counter that implements the
// delay are this design's own choices.
module memory_template
  import reloc_pkg::*;
#(
  parameter int unsigned AW    = TASK_W + IN_W,  // {task, offset}
  parameter int unsigned DW    = OUT_W,
  parameter int unsigned LAT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // fill port (copy of the memorized outputs)
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DW-1:0]     wr_data,
  // latency of the replaced circuits
  input  logic              lat_wr_en,
  input  logic [TASK_W-1:0] lat_task,
  input  logic [LAT_W-1:0]  lat_val,
  // operation
  input  logic              start,
  input  logic [TASK_W-1:0] task_id,
  input  logic [IN_W-1:0]   offset,
  output logic              busy,
  output logic              done,
  output logic [DW-1:0]     data_out
);

  localparam int unsigned MEM_LAT = 2;

  logic [DW-1:0]    mem [2**AW];
  logic [LAT_W-1:0] lat_tab [NUM_TASKS];

  logic [AW-1:0]    raddr_q;
  logic             run_q;
  logic [LAT_W-1:0] cnt_q;
  logic [LAT_W-1:0] target_q;
  logic [LAT_W-1:0] lat_sel;

  assign lat_sel = lat_tab[task_id];
  assign busy    = run_q;

  // memory: write port and registered read
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (run_q && cnt_q == LAT_W'(1)) data_out <= mem[raddr_q];
  end

  // latency table and delay management
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TASKS; i++) lat_tab[i] <= LAT_W'(MEM_LAT);
      raddr_q  <= '0;
      run_q    <= 1'b0;
      cnt_q    <= '0;
      target_q <= LAT_W'(MEM_LAT);
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (lat_wr_en) lat_tab[lat_task] <= lat_val;
      if (!run_q) begin
        if (start) begin
          raddr_q  <= AW'({task_id, offset});
          run_q    <= 1'b1;
          cnt_q    <= LAT_W'(1);
          target_q <= (lat_sel < LAT_W'(MEM_LAT)) ? LAT_W'(MEM_LAT) : lat_sel;
        end
      end else begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q + 1'b1 == target_q) begin
          done  <= 1'b1;
          run_q <= 1'b0;
        end
      end
    end
  end

endmodule
