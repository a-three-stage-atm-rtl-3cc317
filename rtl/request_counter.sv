// request_counter: counts, for one input module, the cells requesting each
// output module (the initial K_ij of the path-allocation array).
//
// It works on the output of the Batcher sorter, where the control packet of
// output module j sits at position D_j = sum_{u<=j} K_u + j, directly above
// the K_j cells that request j. A count generator at every sorter output
// turns a control packet into a count packet {dest = j, data = D_j}; every
// other position submits an inactive packet. The reverse-banyan
// concentrator delivers count packet j to line j, and the adders form
//   K_0 = D_0,   K_j = D_j + ~D_{j-1} = D_j - D_{j-1} - 1   (j > 0).
// D_j is also passed on, since the routing packet generators need D_{j-1}.
//
// Interface and timing: sort_key holds the sorted keys {idle, j, control}
// while `start` is pulsed; k0 and d are valid, and `done` is high, 2*LG+1
// clocks later (LG = log2 of the sorter size), i.e. 15 clocks for 96 ports
// and 32 output modules, as the document states. The document uses
// bit-serial adders; these are word-wide, which is this design's choice.
module request_counter #(
  parameter int unsigned NP = 128,  // sorter outputs, a power of two
  parameter int unsigned L2 = 32,   // output modules
  parameter int unsigned JW = 5,    // width of an output-module number
  parameter int unsigned CW = 7     // width of a count
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [JW+1:0]         sort_key [NP],   // {idle, j, is_control}
  output logic                  done,
  output logic [CW-1:0]         k0 [L2],
  output logic [$clog2(NP)-1:0] d  [L2],
  output logic                  collision
);
  localparam int unsigned LG = $clog2(NP);

  logic          cg_act  [NP];
  logic [LG-1:0] cg_dest [NP];
  logic [LG-1:0] cg_data [NP];
  logic          cn_act  [NP];
  logic [LG-1:0] cn_data [NP];

  // count generators
  for (genvar p = 0; p < NP; p++) begin : g_cg
    assign cg_act[p]  = ~sort_key[p][JW+1] & sort_key[p][0];
    assign cg_dest[p] = LG'(sort_key[p][JW:1]);
    assign cg_data[p] = LG'(p);
  end

  rb_concentrator #(.NP(NP), .DW(LG)) u_conc (
    .clk, .rst_n,
    .in_act (cg_act), .in_dest(cg_dest), .in_data(cg_data),
    .out_act(cn_act), .out_data(cn_data),
    .collision
  );

  // adders: K_j = D_j + ~D_{j-1}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L2; j++) begin
        k0[j] <= '0;
        d[j]  <= '0;
      end
    end else begin
      for (int j = 0; j < L2; j++) begin
        d[j] <= cn_data[j];
        if (j == 0) k0[j] <= CW'(cn_data[0]);
        else        k0[j] <= CW'(LG'(cn_data[j] + ~cn_data[j-1]));
      end
    end
  end

  // start travels alongside the packets
  logic [2*LG:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2*LG-1:0], start};
  end
  assign done = vpipe[2*LG];
endmodule
