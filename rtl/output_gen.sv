// output_gen: soft-output generator of a detector core.
//
// The last-depth survivors stream in one per clock (in_valid/in_path).
// A metric table keeps, for each of the NT*QB bits and each bit value, the
// best (smallest) path metric among the survivors carrying that value;
// all 2*NT*QB cells are compared and updated in parallel every clock. The
// best and worst survivor metrics and the best survivor are tracked too.
// On `finish` (the clock after the last survivor) the L-values are formed:
//   L_b = Gamma_{b,0} - Gamma_{b,1}         (positive favours bit 1)
// and, when every survivor agrees on bit b so that one cell stayed
// undefined, |L_b| = Gamma_wst - Gamma_bst with the sign of the agreed
// value. The hard decisions are the bits of the best survivor. With no
// survivor at all every L-value is 0 and `empty` is set.
// Results are registered; res_valid pulses one clock after `finish` and
// the outputs stay until the next `start`, which empties the table.
// The metric table, the parallel comparators and the best/worst fallback
// follow the published output generator; the 1/N0 scaling of the L-values
// is left to the consumer, and the Gray bit mapping is this design's.
module output_gen
  import rkb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          in_valid,
  input  path_t                         in_path,
  input  logic                          finish,
  output logic                          res_valid,
  output logic signed [NT*QB-1:0][LLRW-1:0] llr,
  output logic [NT*QB-1:0]              hard,
  output logic                          empty,
  output logic                          undef_evt
);

  localparam int NB = NT * QB;

  logic [NB-1:0][1:0][MW-1:0] gtab;
  logic [NB-1:0][1:0]         gdef;
  logic [MW-1:0]              gbst, gwst;
  logic [NB-1:0]              bbits;
  logic                       any;

  logic [NB-1:0] ibits;
  always_comb
    for (int a = 0; a < NT; a++)
      ibits[a*QB +: QB] = sym_bits(in_path.sym[a]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gdef <= '0; any <= 1'b0; res_valid <= 1'b0;
    end else begin
      res_valid <= finish;
      if (start) begin
        gdef <= '0;
        any  <= 1'b0;
      end else if (in_valid) begin
        any <= 1'b1;
        for (int b = 0; b < NB; b++)
          if (!gdef[b][ibits[b]] || in_path.metric < gtab[b][ibits[b]])
            gdef[b][ibits[b]] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !start) begin
      for (int b = 0; b < NB; b++)
        if (!gdef[b][ibits[b]] || in_path.metric < gtab[b][ibits[b]])
          gtab[b][ibits[b]] <= in_path.metric;
      if (!any || in_path.metric < gbst) begin
        gbst  <= in_path.metric;
        bbits <= ibits;
      end
      if (!any || in_path.metric > gwst) gwst <= in_path.metric;
    end
  end

  logic [NB-1:0] undef_c;
  always_ff @(posedge clk) begin
    if (finish) begin
      for (int b = 0; b < NB; b++) begin
        if (!any)
          llr[b] <= '0;
        else if (gdef[b][0] && gdef[b][1])
          llr[b] <= LLRW'(signed'({1'b0, gtab[b][0]})) - LLRW'(signed'({1'b0, gtab[b][1]}));
        else if (gdef[b][1])
          llr[b] <= LLRW'(signed'({1'b0, gwst - gbst}));
        else
          llr[b] <= -LLRW'(signed'({1'b0, gwst - gbst}));
      end
      hard  <= any ? bbits : '0;
      empty <= !any;
    end
  end

  always_comb
    for (int b = 0; b < NB; b++) undef_c[b] = !(gdef[b][0] && gdef[b][1]);
  assign undef_evt = finish && any && (undef_c != '0);

endmodule
