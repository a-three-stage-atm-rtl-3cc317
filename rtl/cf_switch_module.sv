// cf_switch_module: contention-free switch module of the input or the
// intermediate stage.
//
// Each of the NI inputs carries a cell and the number of the channel group
// it must leave on (the intermediate module for an input module, the output
// module for an intermediate module). Path allocation guarantees that no
// group is asked for more than LINKS cells in a slot, so the module needs
// no buffer and no arbitration: the cells bound for a group take its links
// in input order (the n-th such cell takes link n). A cell that would need
// a link beyond LINKS is dropped and raises `overflow`, which path
// allocation never lets happen.
//
// Interface and timing: outputs are registered; a cell presented on the
// inputs appears on out_cell[g][n] one clock later, with an all-zero word
// on unused links. The document only says these modules are simple
// because they are contention-free; the rank-and-select structure is this
// design's choice.
module cf_switch_module #(
  parameter int unsigned NI     = 128,  // inputs
  parameter int unsigned GROUPS = 32,   // output channel groups
  parameter int unsigned LINKS  = 4,    // links per group
  parameter int unsigned GW     = 5,    // width of a group number
  parameter int unsigned W      = 45    // cell width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [NI],
  input  logic [GW-1:0] in_group [NI],
  input  logic [W-1:0]  in_cell  [NI],
  output logic          out_valid[GROUPS][LINKS],
  output logic [W-1:0]  out_cell [GROUPS][LINKS],
  output logic          overflow
);
  localparam int unsigned RW = $clog2(NI + 1);

  logic [RW-1:0] rank [NI];
  logic [NI-1:0] ovf;

  // rank of each cell among the earlier cells of the same group
  for (genvar p = 0; p < NI; p++) begin : g_rank
    always_comb begin
      rank[p] = '0;
      for (int q = 0; q < p; q++)
        if (in_valid[q] && in_group[q] == in_group[p]) rank[p] = rank[p] + 1'b1;
    end
    assign ovf[p] = in_valid[p] && (int'(rank[p]) >= LINKS || int'(in_group[p]) >= GROUPS);
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    for (genvar n = 0; n < LINKS; n++) begin : g_link
      logic          v;
      logic [W-1:0]  c;
      always_comb begin
        v = 1'b0;
        c = '0;
        for (int p = 0; p < NI; p++)
          if (in_valid[p] && in_group[p] == GW'(g) && rank[p] == RW'(n)) begin
            v = 1'b1;
            c = in_cell[p];
          end
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          out_valid[g][n] <= 1'b0;
          out_cell[g][n]  <= '0;
        end else begin
          out_valid[g][n] <= v;
          out_cell[g][n]  <= c;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else        overflow <= |ovf;
  end
endmodule
