// vertex_cache: tag store of the post-transform FIFO vertex cache.
//
// The cache keeps the results of vertex shading for the K most recently
// loaded vertices. A vertex is looked up by index; on a miss it has to be
// fetched and shaded again and is loaded into the slot of the oldest entry
// (FIFO replacement). A hit does not change the replacement order, so every
// vertex stays for exactly K misses. This block holds only the tags: it says
// for each vertex whether it hit and which slot holds (or will hold) its
// shaded attributes, issues a shade request on a miss, and counts lookups and
// misses so that the cache miss ratio (misses per triangle) can be measured.
//
// Interface: triangles in (three indices) with valid/ready; the three vertices
// are looked up one per cycle, in order, and the triangle leaves with the slot
// and hit flag of each vertex once all three are done (valid/ready). The next
// triangle is taken during the last lookup of the current one. Each miss
// raises miss_valid for one cycle with the index and slot (the shader request;
// it is not back-pressured). clear empties the cache and the counters.
// Timing: three cycles per triangle at full rate; the output is registered.
//
// K and FIFO replacement follow the document; the tag-only model, the request
// port and the one-vertex-per-cycle lookup are this design's choices.
module vertex_cache
  import gec_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned IDX_W = IDX_W_DEF,
  localparam int unsigned SLW  = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [IDX_W-1:0] in_v [3],
  input  logic             in_valid,
  output logic             in_ready,
  output logic [IDX_W-1:0] out_v    [3],
  output logic [SLW-1:0]   out_slot [3],
  output logic [2:0]       out_hit,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [IDX_W-1:0] miss_idx,
  output logic [SLW-1:0]   miss_slot,
  output logic             miss_valid,
  output logic [31:0]      lookups,
  output logic [31:0]      misses
);

  logic [IDX_W-1:0] tag   [K];
  logic [K-1:0]     vld;
  logic [SLW-1:0]   next_q;      // slot of the oldest entry
  logic [1:0]       step_q;      // vertex of the current triangle being looked up
  logic             busy_q;
  logic [IDX_W-1:0] cur_v [3];

  // Tag compare for the vertex under lookup.
  logic             hit;
  logic [SLW-1:0]   hit_slot;
  always_comb begin
    hit      = 1'b0;
    hit_slot = '0;
    for (int i = 0; i < K; i++)
      if (vld[i] && tag[i] == cur_v[step_q]) begin
        hit      = 1'b1;
        hit_slot = SLW'(i);
      end
  end

  // The last lookup of a triangle can only finish when the output register is
  // free; a new triangle is taken in that same cycle.
  logic last_step, advance;
  assign last_step = (step_q == 2'd2);
  assign advance   = busy_q && (!last_step || !out_valid || out_ready);
  assign in_ready  = !busy_q || (last_step && advance);

  logic [SLW-1:0] st_slot [2];   // results of the first two lookups
  logic [1:0]     st_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld        <= '0;
      next_q     <= '0;
      step_q     <= '0;
      busy_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_hit    <= '0;
      st_hit     <= '0;
      miss_valid <= 1'b0;
      miss_idx   <= '0;
      miss_slot  <= '0;
      lookups    <= '0;
      misses     <= '0;
      for (int i = 0; i < K; i++) tag[i] <= '0;
      for (int i = 0; i < 2; i++) st_slot[i] <= '0;
      for (int i = 0; i < 3; i++) begin
        cur_v[i]    <= '0;
        out_v[i]    <= '0;
        out_slot[i] <= '0;
      end
    end else if (clear) begin
      vld        <= '0;
      next_q     <= '0;
      step_q     <= '0;
      busy_q     <= 1'b0;
      out_valid  <= 1'b0;
      miss_valid <= 1'b0;
      lookups    <= '0;
      misses     <= '0;
    end else begin
      miss_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (advance) begin
        logic [SLW-1:0] slot;
        lookups <= lookups + 1'b1;
        if (hit) begin
          slot = hit_slot;
        end else begin
          slot        = next_q;
          tag[next_q] <= cur_v[step_q];
          vld[next_q] <= 1'b1;
          next_q      <= SLW'((int'(next_q) + 1) % K);
          misses      <= misses + 1'b1;
          miss_valid  <= 1'b1;
          miss_idx    <= cur_v[step_q];
          miss_slot   <= next_q;
        end
        if (last_step) begin
          out_valid   <= 1'b1;
          out_v       <= cur_v;
          out_slot[0] <= st_slot[0];
          out_slot[1] <= st_slot[1];
          out_slot[2] <= slot;
          out_hit     <= {hit, st_hit};
          busy_q      <= 1'b0;
        end else begin
          st_slot[step_q[0]] <= slot;
          st_hit[step_q[0]]  <= hit;
          step_q             <= step_q + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        cur_v  <= in_v;
        step_q <= '0;
        busy_q <= 1'b1;
      end
    end
  end

endmodule
