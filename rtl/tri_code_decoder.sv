// tri_code_decoder: decoder for the fixed-length per-triangle code.
//
// Every triangle is one CODE_W = 16-bit word. The top three bits are a label
// that says which of the triangle's three vertices are new (F: first use, the
// next value of the running counter g), already in the cache (C: given by FIFO
// position) or reloaded after a flush (R: given as a signed offset from the
// most recently reloaded vertex). The label acts as the select of a
// multiplexer over eight small case decoders; the remaining 13 bits are read
// as follows (A = log2(K) bits per cache position, most significant first):
//   FFC  : c0[A]                         -> (g, g+1, C[c0])
//   FFR  : off[13]                       -> (g, g+1, R)
//   FCC  : c0[A] c1[A]                   -> (g, C[c0], C[c1])
//   FCR  : c0[A] off[13-A]               -> (g, C[c0], R)
//   CCR  : c0[A] d[A-1] off[14-2A]       -> (C[c0], C[c0+d+1 mod K], R)
//   CCC0 : a[A] b[A]                     -> (C[0], C[a], C[b])
//   CCC1 : a[A] b[A]                     -> (C[1], C[a], C[b])
//   DDR  : off[13]                       -> (R, R, R) degenerate reload
// R = last_R + sign-extended off. Cache positions refer to the cache as it
// was before this triangle; the triangle's F and R vertices are then loaded
// into the FIFO copy of the cache in the order listed (up to three loads).
//
// Interface: codes in with valid/ready, triangles out with valid/ready and the
// label; start clears g, last_R and the cache copy. The output is registered
// and one triangle is decoded per cycle.
//
// The eight labels, the 3-bit case field, the 16-bit word, the 2log(K)-1 bits
// for the two cache positions of CCR, the 13-bit reload range and reload
// offsets are taken from the document. The label values, the field order,
// the circular-distance packing of the CCR pair, signed offsets and the
// load order are this design's choices where the document gives no layout.
module tri_code_decoder
  import gec_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned IDX_W = IDX_W_DEF,
  localparam int unsigned A    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned P    = CODE_W - LABEL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CODE_W-1:0] in_code,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [IDX_W-1:0]  tri_v [3],
  output tri_label_e        tri_label,
  output logic              tri_valid,
  input  logic              tri_ready,
  output logic [IDX_W-1:0]  g_count
);

  logic [A-1:0]     rd_pos    [3];
  logic [IDX_W-1:0] rd_data   [3];
  logic [1:0]       push_cnt;
  logic [IDX_W-1:0] push_data [3];

  index_fifo_cache #(.K(K), .IDX_W(IDX_W), .NRD(3), .NPUSH(3)) u_cache (
    .clk, .rst_n, .clear(start), .rd_pos, .rd_data, .push_cnt, .push_data
  );

  logic [IDX_W-1:0] g_q, last_r_q;

  // Sign extension of the low w bits of a payload field.
  function automatic logic [IDX_W-1:0] sext(input logic [P-1:0] f, input int unsigned w);
    logic signed [P-1:0] t;
    t = signed'(f << (P - w)) >>> (P - w);
    return IDX_W'(t);
  endfunction

  tri_label_e       label;
  logic [P-1:0]     pay;
  logic [IDX_W-1:0] r_val;
  logic [IDX_W-1:0] v [3];
  logic             fire;

  // Cache positions to read, per label.
  always_comb begin
    label = tri_label_e'(in_code[CODE_W-1 -: LABEL_W]);
    pay   = in_code[P-1:0];
    for (int i = 0; i < 3; i++) rd_pos[i] = '0;
    unique case (label)
      L_FFC, L_FCR: rd_pos[0] = pay[P-1 -: A];
      L_FCC: begin
        rd_pos[0] = pay[P-1 -: A];
        rd_pos[1] = pay[P-1-A -: A];
      end
      L_CCR: begin
        rd_pos[0] = pay[P-1 -: A];
        rd_pos[1] = A'((int'(pay[P-1 -: A]) + int'(pay[P-1-A -: A-1]) + 1) % K);
      end
      L_CCC0, L_CCC1: begin
        rd_pos[0] = (label == L_CCC1) ? A'(1) : A'(0);
        rd_pos[1] = pay[P-1 -: A];
        rd_pos[2] = pay[P-1-A -: A];
      end
      default: ;
    endcase
  end

  // Vertices of the triangle and loads into the cache copy, per label.
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      push_data[i] = '0;
      v[i]         = '0;
    end
    r_val    = last_r_q;
    push_cnt = '0;
    unique case (label)
      L_FFC: begin
        v[0] = g_q; v[1] = g_q + 1'b1; v[2] = rd_data[0];
        push_data[0] = v[0]; push_data[1] = v[1]; push_cnt = 2'd2;
      end
      L_FFR: begin
        r_val = last_r_q + sext(pay, P);
        v[0] = g_q; v[1] = g_q + 1'b1; v[2] = r_val;
        push_data[0] = v[0]; push_data[1] = v[1]; push_data[2] = r_val; push_cnt = 2'd3;
      end
      L_FCC: begin
        v[0] = g_q; v[1] = rd_data[0]; v[2] = rd_data[1];
        push_data[0] = v[0]; push_cnt = 2'd1;
      end
      L_FCR: begin
        r_val = last_r_q + sext(pay, P - A);
        v[0] = g_q; v[1] = rd_data[0]; v[2] = r_val;
        push_data[0] = v[0]; push_data[1] = r_val; push_cnt = 2'd2;
      end
      L_CCR: begin
        r_val = last_r_q + sext(pay, P - 2*A + 1);
        v[0] = rd_data[0]; v[1] = rd_data[1]; v[2] = r_val;
        push_data[0] = r_val; push_cnt = 2'd1;
      end
      L_CCC0, L_CCC1: begin
        v[0] = rd_data[0]; v[1] = rd_data[1]; v[2] = rd_data[2];
      end
      L_DDR: begin
        r_val = last_r_q + sext(pay, P);
        v[0] = r_val; v[1] = r_val; v[2] = r_val;
        push_data[0] = r_val; push_cnt = 2'd1;
      end
      default: ;
    endcase
    fire = in_valid && (!tri_valid || tri_ready);
    if (!fire) push_cnt = '0;
  end

  assign in_ready = !tri_valid || tri_ready;
  assign g_count  = g_q;

  logic [1:0] n_first;
  logic       has_r;
  always_comb begin
    unique case (label)
      L_FFC, L_FFR:        n_first = 2'd2;
      L_FCC, L_FCR:        n_first = 2'd1;
      default:             n_first = 2'd0;
    endcase
    has_r = label inside {L_FFR, L_FCR, L_CCR, L_DDR};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q       <= '0;
      last_r_q  <= '0;
      tri_valid <= 1'b0;
      tri_label <= L_FFC;
      for (int i = 0; i < 3; i++) tri_v[i] <= '0;
    end else if (start) begin
      g_q       <= '0;
      last_r_q  <= '0;
      tri_valid <= 1'b0;
    end else begin
      if (tri_valid && tri_ready) tri_valid <= 1'b0;
      if (fire) begin
        tri_valid <= 1'b1;
        tri_label <= label;
        for (int i = 0; i < 3; i++) tri_v[i] <= v[i];
        g_q <= g_q + IDX_W'(n_first);
        if (has_r) last_r_q <= r_val;
      end
    end
  end

  // The code must fit the word: two full cache positions next to the label.
  initial begin
    assert (2 * A <= P) else $error("tri_code_decoder: K too large for a %0d-bit code", CODE_W);
  end

endmodule
