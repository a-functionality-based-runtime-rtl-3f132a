// task_memory: list of the circuits that can be relocated by functionality.
//
// A small LUT RAM with one entry per Task ID (the Circuit ID is the entry's
// address).  Each entry holds the circuit's base address in the output
// memory (Base_Addr), the number of offset bits of its section and its
// tolerance shift, plus a flag saying that the circuit is configured and
// relocatable by functionality.  The memo logic forms the output-memory
// address as Base_Addr + offset from these fields.
//
// Interface: one synchronous write port (wr_en/wr_id/wr_entry), used by the
// host when circuits are configured or removed, and one asynchronous read
// port (rd_id -> rd_entry), as a distributed LUT RAM reads.  reloc_mask
// gives the relocatable flags of all entries at once for the FBR check.
// Timing: a write is visible on the read port from the next cycle.  Reset
// clears the relocatable flag of every entry.
// The indexing by Circuit ID and the Base_Addr output follow Fig. 4 of the
// design description; the entry layout and the write port are this design's
// own choices.
module task_memory
  import reloc_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_TASKS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_id,
  input  task_entry_t                wr_entry,
  input  logic [$clog2(ENTRIES)-1:0] rd_id,
  output task_entry_t                rd_entry,
  output logic [ENTRIES-1:0]         reloc_mask   // relocatable flag of every entry
);

  task_entry_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[wr_id] <= wr_entry;
    end
  end

  assign rd_entry = mem[rd_id];

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) reloc_mask[i] = mem[i].relocatable;
  end

endmodule
