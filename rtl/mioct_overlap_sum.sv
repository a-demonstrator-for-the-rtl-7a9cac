// mioct_overlap_sum: multiplicity logic of one octant module.
//
// Takes the 14 aligned sector words of one bunch crossing (two candidates
// each) and produces, for each of the six pT thresholds, the number of
// candidates at or above that threshold, saturated at 7 (3 bits). Muons that
// cross two overlapping trigger sectors would be counted twice, so one
// candidate of each such pair is removed first:
//   * barrel/barrel: sector pairs (BA31,BA32) and (BA01,BA02). When both
//     sectors hold a candidate flagged as lying in the barrel/barrel overlap
//     region (ovl[0]), the lower-pT one of the two highest flagged
//     candidates is dropped (on a tie, the one in BA32 or BA02).
//   * barrel/end-cap: each barrel sector against the end-cap sectors marked
//     in be_map. When the barrel sector and one of them both hold a
//     candidate flagged ovl[1], the lower-pT one is dropped (on a tie, the
//     barrel candidate).
// Which sectors overlap comes from the octant sector map; the flag bits,
// the pairing rule and the inclusive counting (threshold k counts
// candidates with pt >= k) are this design's choices, since the overlap
// algorithm itself is defined elsewhere.
//
// BCID check: each sector word carries the low 3 bits of its BC number.
// With bcid_chk_en set, a mismatch against bcid_exp in any sector makes the
// whole module send zero multiplicity and raises bcid_err, as described.
//
// Timing: one register stage, mult and bcid_err valid one cycle after the
// sector words.
module mioct_overlap_sum
  import muctpi_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_SECTOR-1:0][SECT_W-1:0] sectors,
  input  logic [2:0]              bcid_exp,
  input  logic                    bcid_chk_en,
  input  logic                    bb_en,
  input  logic                    be_en,
  input  logic [3:0][5:0]         be_map,
  output mult_t                   mult,
  output logic                    bcid_err
);
  sector_word_t sw [N_SECTOR];
  cand_t        c  [N_SECTOR][2];
  logic         drop [N_SECTOR][2];
  logic [2:0]   top_pt [N_SECTOR][2];   // [sector][flag]: highest flagged pt
  logic         top_ix [N_SECTOR][2];   // candidate index of that pt
  mult_t        mult_d;
  logic         err_d;

  always_comb begin
    for (int s = 0; s < N_SECTOR; s++) begin
      sw[s]   = sector_word_t'(sectors[s]);
      c[s][0] = sw[s].c0;
      c[s][1] = sw[s].c1;
      for (int f = 0; f < 2; f++) begin
        top_pt[s][f] = '0;
        top_ix[s][f] = 1'b0;
        for (int j = 0; j < 2; j++)
          if (c[s][j].ovl[f] && c[s][j].pt > top_pt[s][f]) begin
            top_pt[s][f] = c[s][j].pt;
            top_ix[s][f] = j[0];
          end
      end
    end
  end

  always_comb begin
    int a, b;
    logic [2:0] e_pt;
    int         e_s;
    logic       e_j;
    for (int s = 0; s < N_SECTOR; s++) begin
      drop[s][0] = 1'b0;
      drop[s][1] = 1'b0;
    end
    // barrel/barrel pairs
    for (int p = 0; p < 2; p++) begin
      a = (p == 0) ? S_BA31 : S_BA01;
      b = (p == 0) ? S_BA32 : S_BA02;
      if (bb_en && top_pt[a][0] != 0 && top_pt[b][0] != 0) begin
        if (top_pt[b][0] <= top_pt[a][0]) drop[b][top_ix[b][0]] = 1'b1;
        else                              drop[a][top_ix[a][0]] = 1'b1;
      end
    end
    // barrel/end-cap
    for (int x = 0; x < 4; x++) begin
      e_pt = '0;
      e_s  = S_EC46;
      e_j  = 1'b0;
      for (int e = 0; e < 6; e++)
        if (be_map[x][e] && top_pt[S_EC46+e][1] > e_pt) begin
          e_pt = top_pt[S_EC46+e][1];
          e_s  = S_EC46 + e;
          e_j  = top_ix[S_EC46+e][1];
        end
      if (be_en && top_pt[x][1] != 0 && e_pt != 0) begin
        if (top_pt[x][1] <= e_pt) drop[x][top_ix[x][1]] = 1'b1;
        else                      drop[e_s][e_j]        = 1'b1;
      end
    end
  end

  always_comb begin
    logic [5:0] n;
    err_d = 1'b0;
    for (int s = 0; s < N_SECTOR; s++)
      if (bcid_chk_en && sw[s].bcid != bcid_exp) err_d = 1'b1;
    for (int k = 1; k <= N_THR; k++) begin
      n = '0;
      for (int s = 0; s < N_SECTOR; s++)
        for (int j = 0; j < 2; j++)
          if (!drop[s][j] && c[s][j].pt >= 3'(k)) n = n + 1'b1;
      mult_d[k-1] = err_d ? '0 : (n > 6'(MULT_MAX)) ? MULT_W'(MULT_MAX) : n[MULT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mult     <= '0;
      bcid_err <= 1'b0;
    end else begin
      mult     <= mult_d;
      bcid_err <= err_d;
    end
endmodule
