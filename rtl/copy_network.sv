// copy_network: broadcast banyan copy network with Boolean interval
// splitting (after Lee).
//
// A routing packet carries an address interval [lo, hi]; the network
// delivers a copy of it to every output line in that interval. There are
// LG = log2(NP) stages, each a perfect shuffle of the lines followed by a
// column of 2x2 elements. Stage s looks at bit p = LG-1-s of lo and hi
// (most significant first): if the two bits are equal the packet goes to
// that output; if lo has 0 and hi has 1 the packet is copied to both, the
// upper copy with hi cut to ...0111 and the lower copy with lo raised to
// ...1000 below bit p. In the switch, routing packet generator j sits on
// input j and its interval starts at D_{j-1}+1 >= j, with intervals in
// increasing order; such patterns pass without two packets meeting at an
// element output. If they ever do, the packet from the upper element input
// is kept and `collision` is raised.
//
// Interface and timing: fully pipelined, one set of packets per clock.
// Each stage takes two clocks (element setting, then move), so the latency
// is 2*LG clocks. The packet payload (token, first and null flags) is
// carried unchanged. The stage structure and the two clocks per stage are
// this design's reading of the document.
module copy_network #(
  parameter int unsigned NP = 128,  // lines, a power of two
  parameter int unsigned PW = 8     // payload carried with each packet
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_act [NP],
  input  logic [$clog2(NP)-1:0] in_lo  [NP],
  input  logic [$clog2(NP)-1:0] in_hi  [NP],
  input  logic [PW-1:0]         in_pay [NP],
  output logic                  out_act[NP],
  output logic [PW-1:0]         out_pay[NP],
  output logic                  collision
);
  localparam int unsigned LG = $clog2(NP);

  typedef struct packed {
    logic          act;
    logic [LG-1:0] lo;
    logic [LG-1:0] hi;
    logic [PW-1:0] pay;
  } pkt_t;

  pkt_t x [LG+1][NP];     // packets leaving stage s-1 (x[0]: inputs)
  logic [LG-1:0][NP/2-1:0] coll;

  for (genvar p = 0; p < NP; p++) begin : g_in
    assign x[0][p] = '{act: in_act[p], lo: in_lo[p], hi: in_hi[p], pay: in_pay[p]};
  end

  for (genvar s = 0; s < LG; s++) begin : g_stage
    localparam int unsigned B = LG - 1 - s;       // address bit used here
    localparam logic [LG-1:0] LOWMASK = LG'((1 << B) - 1);
    localparam logic [LG-1:0] BITMASK = LG'(1 << B);
    for (genvar e = 0; e < NP / 2; e++) begin : g_elem
      // element inputs after the perfect shuffle: line y comes from the
      // line whose left rotation is y
      localparam int unsigned X0 = ((2 * e) >> 1) | (((2 * e) & 1) << (LG - 1));
      localparam int unsigned X1 = ((2 * e + 1) >> 1) | (((2 * e + 1) & 1) << (LG - 1));
      pkt_t u0_q, u1_q;
      logic [1:0] w0_q, w1_q;   // outputs wanted by each input, bit b = output b
      pkt_t q0, q1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          u0_q <= '0;
          u1_q <= '0;
          w0_q <= '0;
          w1_q <= '0;
        end else begin
          u0_q <= x[s][X0];
          u1_q <= x[s][X1];
          w0_q <= x[s][X0].act ? {x[s][X0].hi[B], ~x[s][X0].lo[B]} : 2'b00;
          w1_q <= x[s][X1].act ? {x[s][X1].hi[B], ~x[s][X1].lo[B]} : 2'b00;
        end
      end
      // the copies sent to outputs 0 and 1, with their intervals clipped
      pkt_t c00, c01, c10, c11;
      always_comb begin
        c00 = u0_q;
        c01 = u0_q;
        c10 = u1_q;
        c11 = u1_q;
        // a packet wanting both outputs is split into two intervals
        if (w0_q == 2'b11) begin
          c00.hi = (u0_q.hi & ~LOWMASK & ~BITMASK) | LOWMASK;
          c01.lo = (u0_q.lo & ~LOWMASK) | BITMASK;
        end
        if (w1_q == 2'b11) begin
          c10.hi = (u1_q.hi & ~LOWMASK & ~BITMASK) | LOWMASK;
          c11.lo = (u1_q.lo & ~LOWMASK) | BITMASK;
        end
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          q0 <= '0;
          q1 <= '0;
        end else begin
          q0 <= w0_q[0] ? c00 : (w1_q[0] ? c10 : '0);
          q1 <= w0_q[1] ? c01 : (w1_q[1] ? c11 : '0);
        end
      end
      assign x[s+1][2*e]   = q0;
      assign x[s+1][2*e+1] = q1;
      assign coll[s][e] = |(w0_q & w1_q);
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_out
    assign out_act[p] = x[LG][p].act;
    assign out_pay[p] = x[LG][p].pay;
  end
  assign collision = |coll;
endmodule
