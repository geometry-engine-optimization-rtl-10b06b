// index_fifo_cache: the decompressor's private copy of the vertex cache.
//
// It holds the vertex index stored in each of the K entries of a FIFO-replaced
// cache, so that a code naming "cache position j" can be turned back into a
// vertex index. Entries are read by FIFO position: position 0 is the front of
// the queue, the oldest entry and the next one to be flushed; position K-1 is
// the newest. A load (a first use or a reload) overwrites the front entry and
// makes the loaded index the newest. Reading an entry never changes the order,
// as in a FIFO cache.
//
// Interface: NRD combinational read ports (position in, index out) that see the
// state before this cycle's loads; up to NPUSH loads per cycle, applied in the
// order push_data[0], push_data[1], ... and counted by push_cnt. clear empties
// the cache to all-zero indices and resets the queue pointer.
//
// The cache size and FIFO replacement follow the document; position
// numbering, multi-load ordering and the all-zero clear are this design's
// choices. The storage is a register array so that several reads and loads
// can happen in one cycle.
module index_fifo_cache #(
  parameter int unsigned K     = 16,
  parameter int unsigned IDX_W = 32,
  parameter int unsigned NRD   = 3,
  parameter int unsigned NPUSH = 3,
  localparam int unsigned PW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW   = $clog2(NPUSH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [PW-1:0]    rd_pos  [NRD],
  output logic [IDX_W-1:0] rd_data [NRD],
  input  logic [CW-1:0]    push_cnt,
  input  logic [IDX_W-1:0] push_data [NPUSH]
);

  logic [IDX_W-1:0] mem [K];
  logic [PW-1:0]    head;   // physical slot of FIFO position 0

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] a, input int unsigned b);
    return PW'((int'(a) + b) % K);
  endfunction

  always_comb begin
    for (int r = 0; r < NRD; r++)
      rd_data[r] = mem[wrap_add(head, int'(rd_pos[r]))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      for (int i = 0; i < K; i++) mem[i] <= '0;
    end else if (clear) begin
      head <= '0;
      for (int i = 0; i < K; i++) mem[i] <= '0;
    end else begin
      for (int p = 0; p < NPUSH; p++)
        if (p < int'(push_cnt)) mem[wrap_add(head, p)] <= push_data[p];
      head <= wrap_add(head, int'(push_cnt));
    end
  end

  initial begin
    assert (NPUSH <= K) else $error("index_fifo_cache: NPUSH must not exceed K");
  end

endmodule
