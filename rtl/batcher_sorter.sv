// batcher_sorter: Batcher bitonic sorting network with a registered output.
//
// Sorts N records {key, data} into ascending key order. In the switch it
// merges the data cells of one input module with one control packet per
// output module: the key is {idle, output module, is_control}, so idle
// cells go to the top outputs and the control packet of output module j
// lands directly above the cells that request j. When N is not a power of
// two the network is padded internally with records that sort above every
// real one. Records with equal keys leave in no defined order.
//
// Interface and timing: the network itself is combinational; the sorted
// records are captured in the output register on a clock edge with `load`
// high and held until the next `load` (one cycle of latency). The document
// names a Batcher network; the bitonic variant and the single output
// register are this design's choice.
module batcher_sorter #(
  parameter int unsigned N  = 128,  // records
  parameter int unsigned KW = 7,    // key width
  parameter int unsigned DW = 45    // width of the data carried with the key
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [KW-1:0] key_in  [N],
  input  logic [DW-1:0] data_in [N],
  output logic [KW-1:0] key_out [N],
  output logic [DW-1:0] data_out[N]
);
  localparam int unsigned NP = 1 << $clog2(N);

  typedef struct packed {
    logic          pad;   // padding record, sorts above all real ones
    logic [KW-1:0] key;
    logic [DW-1:0] data;
  } rec_t;

  localparam int unsigned LG   = $clog2(NP);
  localparam int unsigned NSTG = LG * (LG + 1) / 2;

  // merge-block and compare-distance exponents of comparator stage s
  function automatic int unsigned stage_kl(int unsigned s);
    int unsigned kl, base;
    kl = 1; base = 0;
    while (base + kl <= s) begin
      base += kl;
      kl++;
    end
    return kl;
  endfunction
  function automatic int unsigned stage_jl(int unsigned s);
    int unsigned kl;
    kl = stage_kl(s);
    return kl - 1 - (s - kl * (kl - 1) / 2);
  endfunction

  rec_t w0 [NP];   // records entering the first stage

  for (genvar p = 0; p < NP; p++) begin : g_in
    if (p < N) begin : g_real
      assign w0[p] = '{pad: 1'b0, key: key_in[p], data: data_in[p]};
    end else begin : g_pad
      assign w0[p] = '{pad: 1'b1, key: '1, data: '0};
    end
  end

  // bitonic sort: stage s merges blocks of size 2^kl, comparing at
  // distance 2^jl; blocks with bit kl of the index clear sort upwards
  for (genvar s = 0; s < NSTG; s++) begin : g_st
    localparam int unsigned KK = 1 << stage_kl(s);
    localparam int unsigned JJ = 1 << stage_jl(s);
    rec_t vi [NP];
    rec_t vo [NP];
    if (s == 0) begin : g_first
      assign vi = w0;
    end else begin : g_next
      assign vi = g_st[s-1].vo;
    end
    for (genvar p = 0; p < NP; p++) begin : g_cmp
      localparam int unsigned Q = p ^ JJ;
      if (Q > p) begin : g_pair
        logic up, gt;
        assign up = ((p & KK) == 0);
        assign gt = {vi[p].pad, vi[p].key} > {vi[Q].pad, vi[Q].key};
        assign vo[p] = (up == gt) ? vi[Q] : vi[p];
        assign vo[Q] = (up == gt) ? vi[p] : vi[Q];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin
        key_out[p]  <= '1;
        data_out[p] <= '0;
      end
    end else if (load) begin
      for (int p = 0; p < N; p++) begin
        key_out[p]  <= g_st[NSTG-1].vo[p].key;
        data_out[p] <= g_st[NSTG-1].vo[p].data;
      end
    end
  end
endmodule
