// tb_mioct_overlap_sum: checks the octant multiplicity logic. Directed cases
// with hand-worked results cover barrel/barrel and barrel/end-cap overlap,
// saturation at 7 and the BCID check; then random sector words are compared
// with a reference count built from a list of candidates. The result must
// appear exactly one clock edge after the sector words.
//
// The six thresholds, saturation and zero multiplicity on BCID mismatch
// follow the document; the overlap rule and word layout are this design's.
// No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mioct_overlap_sum;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SECTOR-1:0][SECT_W-1:0] sectors = '0;
  logic [2:0] bcid_exp = '0;
  logic bcid_chk_en = 1'b1, bb_en = 1'b1, be_en = 1'b1;
  logic [3:0][5:0] be_map = BE_MAP_DEFAULT;
  mult_t mult;
  logic bcid_err;
  int checks = 0, failures = 0;
  int n_bb = 0, n_be = 0, n_sat = 0, n_err = 0;

  mioct_overlap_sum dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] sw(input logic [2:0] bc, input logic [2:0] p0, input logic [1:0] o0,
                                     input logic [2:0] p1, input logic [1:0] o1);
    sector_word_t w;
    w = '0; w.bcid = bc;
    w.c0.pt = p0; w.c0.ovl = o0; w.c0.roi = 8'($urandom);
    w.c1.pt = p1; w.c1.ovl = o1; w.c1.roi = 8'($urandom);
    return w;
  endfunction

  function automatic mult_t m6(input int a1, a2, a3, a4, a5, a6);
    return {3'(a6), 3'(a5), 3'(a4), 3'(a3), 3'(a2), 3'(a1)};
  endfunction

  // reference: list of candidates, remove one per overlapping pair, count
  function automatic mult_t ref_mult(input logic [N_SECTOR-1:0][SECT_W-1:0] s);
    int pt [N_SECTOR][2];
    bit f [N_SECTOR][2][2];
    bit rm [N_SECTOR][2];
    int best [N_SECTOR][2];      // index of best flagged cand or -1
    int cnt [7];
    bit err = 0;
    int bb_a [2] = '{S_BA31, S_BA01};
    int bb_b [2] = '{S_BA32, S_BA02};
    mult_t r;
    for (int i = 0; i < N_SECTOR; i++) begin
      sector_word_t w = s[i];
      pt[i][0] = w.c0.pt; pt[i][1] = w.c1.pt;
      f[i][0][0] = w.c0.ovl[0]; f[i][0][1] = w.c0.ovl[1];
      f[i][1][0] = w.c1.ovl[0]; f[i][1][1] = w.c1.ovl[1];
      rm[i][0] = 0; rm[i][1] = 0;
      if (bcid_chk_en && w.bcid != bcid_exp) err = 1;
      for (int k = 0; k < 2; k++) begin
        best[i][k] = -1;
        if (f[i][0][k] && pt[i][0] > 0) best[i][k] = 0;
        if (f[i][1][k] && pt[i][1] > 0 && (best[i][k] < 0 || pt[i][1] > pt[i][0])) best[i][k] = 1;
      end
    end
    if (err) begin n_err++; return '0; end
    if (bb_en)
      for (int p = 0; p < 2; p++) begin
        int a = bb_a[p], b = bb_b[p];
        if (best[a][0] >= 0 && best[b][0] >= 0) begin
          n_bb++;
          if (pt[b][best[b][0]] <= pt[a][best[a][0]]) rm[b][best[b][0]] = 1;
          else rm[a][best[a][0]] = 1;
        end
      end
    if (be_en)
      for (int x = 0; x < 4; x++) begin
        int es = -1, ej = 0, ep = 0;
        for (int e = 0; e < 6; e++)
          if (be_map[x][e] && best[S_EC46+e][1] >= 0 && pt[S_EC46+e][best[S_EC46+e][1]] > ep) begin
            es = S_EC46 + e; ej = best[es][1]; ep = pt[es][ej];
          end
        if (best[x][1] >= 0 && es >= 0) begin
          n_be++;
          if (pt[x][best[x][1]] <= ep) rm[x][best[x][1]] = 1;
          else rm[es][ej] = 1;
        end
      end
    for (int t = 1; t <= 6; t++) begin
      cnt[t] = 0;
      for (int i = 0; i < N_SECTOR; i++)
        for (int j = 0; j < 2; j++)
          if (!rm[i][j] && pt[i][j] >= t) cnt[t]++;
      if (cnt[t] > 7) begin cnt[t] = 7; n_sat++; end
    end
    return m6(cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6]);
  endfunction

  task automatic apply(input mult_t exp, input bit exp_err, input string what);
    @(negedge clk);
    @(posedge clk); #1;
    checks++;
    if (mult !== exp || bcid_err !== exp_err) begin
      failures++;
      $display("FAIL %s: mult %h exp %h err %0d exp %0d", what, mult, exp, bcid_err, exp_err);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // barrel/barrel: BA01 pT5 and BA02 pT3 both flagged -> one muon pT5
    sectors = '0; bcid_exp = 3'd2;
    for (int i = 0; i < N_SECTOR; i++) sectors[i] = sw(3'd2, 0, 0, 0, 0);
    sectors[S_BA01] = sw(3'd2, 5, 2'b01, 0, 0);
    sectors[S_BA02] = sw(3'd2, 3, 2'b01, 0, 0);
    apply(m6(1, 1, 1, 1, 1, 0), 0, "bb");
    // same without flags -> two muons
    sectors[S_BA02] = sw(3'd2, 3, 2'b00, 0, 0);
    apply(m6(2, 2, 2, 1, 1, 0), 0, "bb unflagged");
    // barrel/end-cap: BA32 pT2 flagged, EC47 pT4 flagged -> barrel one dropped
    sectors[S_BA01] = sw(3'd2, 0, 0, 0, 0);
    sectors[S_BA02] = sw(3'd2, 0, 0, 0, 0);
    sectors[S_BA32] = sw(3'd2, 2, 2'b10, 0, 0);
    sectors[S_EC47] = sw(3'd2, 0, 0, 4, 2'b10);
    apply(m6(1, 1, 1, 1, 0, 0), 0, "be");
    // not neighbours: BA32 with EC01 -> both counted
    sectors[S_EC47] = sw(3'd2, 0, 0, 0, 0);
    sectors[S_EC01] = sw(3'd2, 4, 2'b10, 0, 0);
    apply(m6(2, 2, 1, 1, 0, 0), 0, "be far");
    // overlap switched off
    sectors[S_EC01] = sw(3'd2, 0, 0, 0, 0);
    sectors[S_EC48] = sw(3'd2, 4, 2'b10, 0, 0);
    be_en = 1'b0;
    apply(m6(2, 2, 1, 1, 0, 0), 0, "be off");
    be_en = 1'b1;
    apply(m6(1, 1, 1, 1, 0, 0), 0, "be on");
    // saturation: 28 candidates of pT 6
    for (int i = 0; i < N_SECTOR; i++) sectors[i] = sw(3'd2, 6, 0, 6, 0);
    apply(m6(7, 7, 7, 7, 7, 7), 0, "saturate");
    // BCID mismatch in one sector -> zero
    sectors[S_FW01] = sw(3'd3, 6, 0, 6, 0);
    apply('0, 1, "bcid");
    bcid_chk_en = 1'b0;
    apply(m6(7, 7, 7, 7, 7, 7), 0, "bcid off");
    bcid_chk_en = 1'b1;
    // random
    for (int n = 0; n < 20000; n++) begin
      mult_t e;
      @(negedge clk);
      bcid_exp = 3'($urandom);
      for (int i = 0; i < N_SECTOR; i++) begin
        logic [2:0] p0, p1;
        p0 = ($urandom % 4 == 0) ? 3'($urandom % 7) : 3'd0;
        p1 = ($urandom % 6 == 0) ? 3'($urandom % 7) : 3'd0;
        sectors[i] = sw(($urandom % 200 == 0) ? bcid_exp + 3'd1 : bcid_exp, p0, 2'($urandom), p1, 2'($urandom));
      end
      bb_en = ($urandom % 8 != 0);
      be_en = ($urandom % 8 != 0);
      e = ref_mult(sectors);
      @(posedge clk); #1;
      checks++;
      if (mult !== e) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d: mult %h exp %h", n, mult, e);
      end
    end
    $display("mechanisms: barrel/barrel %0d barrel/endcap %0d saturated %0d bcid errors %0d", n_bb, n_be, n_sat, n_err);
    checks++;
    if (n_bb == 0 || n_be == 0 || n_sat == 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
