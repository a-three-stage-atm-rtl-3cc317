// rb_concentrator: reverse-banyan self-routing network used as a
// concentrator.
//
// NP = 2^LG lines, LG stages of 2x2 elements. Stage s routes a packet by
// bit s of its destination (least significant bit first) and then passes
// the lines through an inverse perfect shuffle, so a packet leaves on the
// line equal to its destination. When the active packets, taken in input
// order, are addressed to consecutive outputs 0, 1, 2, ... (as the count
// packets of the request counter are), no two packets ever meet at an
// element output. Should that rule be broken, the packet from the lower
// element input wins and `collision` is raised for one cycle.
//
// Interface and timing: a fully pipelined network; a new set of packets
// may enter every clock. Each stage takes two clocks, as in the document:
// the first registers the packets together with the element setting, the
// second moves them to the element outputs. Latency is 2*LG clocks.
module rb_concentrator #(
  parameter int unsigned NP = 128,  // lines, a power of two
  parameter int unsigned DW = 7     // data carried by each packet
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_act  [NP],
  input  logic [$clog2(NP)-1:0]  in_dest [NP],
  input  logic [DW-1:0]          in_data [NP],
  output logic                   out_act [NP],
  output logic [DW-1:0]          out_data[NP],
  output logic                   collision
);
  localparam int unsigned LG = $clog2(NP);

  typedef struct packed {
    logic          act;
    logic [LG-1:0] dest;
    logic [DW-1:0] data;
  } pkt_t;

  pkt_t x [LG+1][NP];     // packets entering stage s
  logic [LG-1:0][NP/2-1:0] coll;

  for (genvar p = 0; p < NP; p++) begin : g_in
    assign x[0][p] = '{act: in_act[p], dest: in_dest[p], data: in_data[p]};
  end

  for (genvar s = 0; s < LG; s++) begin : g_stage
    for (genvar e = 0; e < NP / 2; e++) begin : g_elem
      // destination line of element output b after the inverse shuffle
      localparam int unsigned Y0 = (2 * e) >> 1;
      localparam int unsigned Y1 = ((2 * e + 1) >> 1) | (1 << (LG - 1));
      pkt_t u0_q, u1_q;
      logic swap_q, coll_q;
      pkt_t o0, o1;
      // first clock: element setting
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          u0_q   <= '0;
          u1_q   <= '0;
          swap_q <= 1'b0;
          coll_q <= 1'b0;
        end else begin
          u0_q   <= x[s][2*e];
          u1_q   <= x[s][2*e+1];
          swap_q <= x[s][2*e].act ? x[s][2*e].dest[s]
                                  : (x[s][2*e+1].act & ~x[s][2*e+1].dest[s]);
          coll_q <= x[s][2*e].act & x[s][2*e+1].act
                    & (x[s][2*e].dest[s] == x[s][2*e+1].dest[s]);
        end
      end
      // second clock: move the packets
      always_comb begin
        o0 = swap_q ? u1_q : u0_q;
        o1 = swap_q ? u0_q : u1_q;
        if (coll_q) begin
          // both wanted the same output: the lower input keeps it
          if (u0_q.dest[s]) begin o1 = u0_q; o0 = '0; end
          else              begin o0 = u0_q; o1 = '0; end
        end
      end
      pkt_t q0, q1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          q0 <= '0;
          q1 <= '0;
        end else begin
          q0 <= o0;
          q1 <= o1;
        end
      end
      assign x[s+1][Y0] = q0;
      assign x[s+1][Y1] = q1;
      assign coll[s][e] = coll_q;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_out
    assign out_act[p]  = x[LG][p].act;
    assign out_data[p] = x[LG][p].data;
  end
  assign collision = |coll;
endmodule
