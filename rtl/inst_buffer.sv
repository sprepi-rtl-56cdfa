// inst_buffer: buffer of every fetched instruction still in flight.
//
// A circular buffer with as many entries as the processor can have
// instructions in flight (the reorder-buffer size, 128), so that on a
// predicate misprediction renaming can be re-run, at full rename width,
// from the first instruction of the mispredicted group without fetching
// again: the corrected instruction sequence is exactly the fetched one.
// Each entry holds the decoded instruction, its predicated-group tag and
// the outcome of its last renaming (physical destination, previous mapping,
// whether the map was updated, rename form).  The buffer slot number also
// serves as the instruction's reorder-buffer tag.
//
// Ports: alloc_n entries enter at tail (slot tail+i for bundle slot i);
// wr_* rewrites rename records (first rename and every replay); rd_* and
// cm_* are W combinational read ports at arbitrary slots and at head..head+W-1;
// commit_n entries leave at head; flush empties the buffer.  All writes
// take effect at the clock edge.  The caller must not allocate beyond
// free_n.
module inst_buffer
  import sprepi_pkg::*;
#(
  parameter int DEPTH = ROB_SIZE,
  parameter int W     = WIDTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic [$clog2(W+1)-1:0] alloc_n,
  input  bent_t [W-1:0]          alloc_ent,
  output idx_t                   tail,
  output idx_t                   head,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free_n,
  input  logic [W-1:0]           wr_v,
  input  idx_t [W-1:0]           wr_idx,
  input  rrec_t [W-1:0]          wr_rec,
  input  idx_t [W-1:0]           rd_idx,
  output bent_t [W-1:0]          rd_ent,
  output bent_t [W-1:0]          cm_ent,
  input  logic [$clog2(W+1)-1:0] commit_n
);
  localparam int AW = $clog2(DEPTH);

  bent_t        mem [DEPTH];
  logic [AW:0]  head_q, tail_q;

  assign count  = ($clog2(DEPTH+1))'(tail_q - head_q);
  assign free_n = ($clog2(DEPTH+1))'(DEPTH) - count;
  assign head   = idx_t'(head_q[AW-1:0]);
  assign tail   = idx_t'(tail_q[AW-1:0]);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rd_ent[i] = mem[rd_idx[i][AW-1:0]];
      cm_ent[i] = mem[AW'(head_q + (AW+1)'(i))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      for (int e = 0; e < DEPTH; e++) mem[e] <= '0;
    end else if (flush) begin
      head_q <= '0;
      tail_q <= '0;
    end else begin
      for (int i = 0; i < W; i++)
        if (i < int'(alloc_n)) mem[AW'(tail_q + (AW+1)'(i))] <= alloc_ent[i];
      for (int i = 0; i < W; i++)
        if (wr_v[i]) mem[wr_idx[i][AW-1:0]].rec <= wr_rec[i];
      tail_q <= tail_q + (AW+1)'(alloc_n);
      head_q <= head_q + (AW+1)'(commit_n);
    end
  end
endmodule
