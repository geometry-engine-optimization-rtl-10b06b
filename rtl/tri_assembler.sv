// tri_assembler: primitive assembly for an indexed triangle list.
//
// The per-index decoder delivers the list one vertex index at a time; every
// three consecutive indices form one triangle. The assembler collects them and
// hands the triangle on as a whole, which keeps primitive assembly as simple
// as a plain triangle list.
//
// Interface: indices in with valid/ready, triangles out with valid/ready;
// clear drops a partly collected triangle. The third index is accepted in the
// same cycle as the triangle is output when the consumer is ready, so one
// triangle leaves every three accepted indices with no bubble.
// Grouping by three follows the document's triangle list; the handshake is
// this design's choice.
module tri_assembler
  import gec_pkg::*;
#(
  parameter int unsigned IDX_W = IDX_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [IDX_W-1:0] in_idx,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [IDX_W-1:0] tri_v [3],
  output logic             tri_valid,
  input  logic             tri_ready
);

  logic [IDX_W-1:0] held [2];
  logic [1:0]       cnt_q;     // indices held, 0..2

  assign in_ready  = (cnt_q != 2'd2) || tri_ready;
  assign tri_valid = (cnt_q == 2'd2) && in_valid;
  assign tri_v[0]  = held[0];
  assign tri_v[1]  = held[1];
  assign tri_v[2]  = in_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      held[0] <= '0;
      held[1] <= '0;
    end else if (clear) begin
      cnt_q <= '0;
    end else if (in_valid && in_ready) begin
      if (cnt_q == 2'd2) begin
        cnt_q <= '0;
      end else begin
        held[cnt_q[0]] <= in_idx;
        cnt_q          <= cnt_q + 1'b1;
      end
    end
  end

endmodule
