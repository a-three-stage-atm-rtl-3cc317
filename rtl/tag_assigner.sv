// tag_assigner: routing-tag assignment for one input module: routing
// packet generators (RPG), copy network and address generators (AG).
//
// During path allocation the outstanding-request count K_j of output
// module j shrinks as paths are found. The cells requesting j sit at
// sorter outputs D_{j-1}+1 .. D_{j-1}+K0_j. Before iteration 0 and after
// every iteration, RPG_j broadcasts a token to the first K_j of them
// (interval [D_{j-1}+1, D_{j-1}+K_j]); if K_j = 0 it sends nothing. A cell
// keeps only the last token it gets, so a cell that stops receiving tokens
// keeps the intermediate module of the iteration that routed it. The first
// broadcast carries the intermediate-module number (i + j) mod MP; later
// ones carry none, and each AG steps its stored number down by one, modulo
// MP, whenever a packet reaches it, because the array visits intermediate
// module (i + j - k) mod MP in iteration k. The last broadcast, after the
// final iteration, is the null token, marking the cells that lost.
//
// Interface and timing: pulse `clear` to empty the AGs before a slot.
// Drive `bcast` for MP + 1 consecutive clocks with the current K values,
// `first` high in the first of them and `nul` high in the last. The AGs
// have settled 2*LG + 1 clocks after the last broadcast. tag_valid[p] is
// high for a data cell (cell_valid[p]) that holds a real token; lost[p]
// for a data cell whose token is null. RPG_j on copy-network input j and
// word-wide packets are this design's choices.
module tag_assigner #(
  parameter int unsigned NP = 128,  // sorter outputs, a power of two
  parameter int unsigned L2 = 32,   // output modules
  parameter int unsigned MP = 32,   // array size max(L1, L2, M)
  parameter int unsigned CW = 7,    // width of a count
  parameter int unsigned TW = 6     // token width, holds 0..MP (MP = null)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [TW-1:0]         im_idx,      // i, this input module
  input  logic                  clear,
  input  logic                  bcast,
  input  logic                  first,
  input  logic                  nul,
  input  logic [CW-1:0]         k    [L2],
  input  logic [$clog2(NP)-1:0] d    [L2],   // D_j from the request counter
  input  logic                  cell_valid [NP],
  output logic [TW-1:0]         tag  [NP],
  output logic                  tag_valid [NP],
  output logic                  lost [NP],
  output logic                  collision
);
  localparam int unsigned LG = $clog2(NP);
  localparam logic [TW-1:0] NULL_TOK = TW'(MP);

  typedef struct packed {
    logic          first;
    logic          nul;
    logic [TW-1:0] tok;
  } pay_t;

  logic          rp_act [NP];
  logic [LG-1:0] rp_lo  [NP];
  logic [LG-1:0] rp_hi  [NP];
  pay_t          rp_pay [NP];
  logic          cn_act [NP];
  pay_t          cn_pay [NP];

  // routing packet generators
  for (genvar p = 0; p < NP; p++) begin : g_rpg
    if (p < L2) begin : g_gen
      logic [LG-1:0] lo;
      assign lo         = (p == 0) ? '0 : LG'(d[p-1] + 1'b1);
      assign rp_act[p]  = bcast & (k[p] != '0);
      assign rp_lo[p]   = lo;
      assign rp_hi[p]   = LG'(lo + LG'(k[p]) - 1'b1);
      assign rp_pay[p]  = '{first: first, nul: nul,
                            tok: first ? TW'((im_idx + TW'(p)) % TW'(MP)) : '0};
    end else begin : g_idle
      assign rp_act[p] = 1'b0;
      assign rp_lo[p]  = '0;
      assign rp_hi[p]  = '0;
      assign rp_pay[p] = '0;
    end
  end

  copy_network #(.NP(NP), .PW($bits(pay_t))) u_copy (
    .clk, .rst_n,
    .in_act (rp_act), .in_lo(rp_lo), .in_hi(rp_hi), .in_pay(rp_pay),
    .out_act(cn_act), .out_pay(cn_pay),
    .collision
  );

  // address generators
  for (genvar p = 0; p < NP; p++) begin : g_ag
    logic [TW-1:0] tok_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                tok_q <= NULL_TOK;
      else if (clear)            tok_q <= NULL_TOK;
      else if (cn_act[p]) begin
        if (cn_pay[p].nul)        tok_q <= NULL_TOK;
        else if (cn_pay[p].first) tok_q <= cn_pay[p].tok;
        else if (tok_q == '0)     tok_q <= TW'(MP - 1);
        else                      tok_q <= tok_q - 1'b1;
      end
    end
    assign tag[p]       = tok_q;
    assign tag_valid[p] = cell_valid[p] & (tok_q != NULL_TOK);
    assign lost[p]      = cell_valid[p] & (tok_q == NULL_TOK);
  end
endmodule
