// tb_muctpi_top: the whole interface at its default sizes (16 octant
// modules of 14 sectors). Random sector words, with varying density and
// random overlap flags, arrive with cable latencies of 0..2 BCs that the
// programmed delays align. Checked:
//   * the multiplicity at the CTP every BC against a reference that removes
//     overlapping candidates and saturates at 7, exactly 6 edges after the
//     sector words are sampled (within the 8-BC limit);
//   * for every L1A, the data-acquisition S-Link event (L1ID, BCID,
//     multiplicity, every candidate of the 3-BC window in order) and the
//     Level-2 event (triggering-BC candidates sorted by pT, cut to 8);
//   * monitoring of flagged events through the register bus, BUSY during
//     an L1A burst, BCID errors after a wrong delay, and test-memory
//     play-back started by the test signal, seen at the CTP output.
// Each mechanism (barrel/barrel and barrel/end-cap overlap, saturation,
// zero suppression, Level-2 limit, link full, monitoring, BUSY, overrun
// flag in the burst, BCID error, test play-back) must occur at least once.
//
// Set-up: octant modules read a 3-BC window (1 before, 1 after) 60 BCs after
// the data, with zero suppression and both overlap removals; the CTP
// interface uses latency 58; the read-out driver limits Level-2 to 8
// candidates and monitors flagged events. Every 5th L1A carries the
// monitoring signal; the DAQ link reports full on a random 1/8 of cycles.
// The top runs at its default sizes. The reference models here (overlap
// rule, ROD layout, window order) restate the rules the design chose, so
// they check the wiring and timing of the whole, not the document.
module tb_muctpi_top;
  import muctpi_pkg::*;
  localparam int LO = 60, LC = 58, LIM = 8, NEV = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_MIOCT-1:0][N_SECTOR-1:0][SECT_W-1:0] sector_in = '0;
  logic ctp_bcr = 0, ctp_ecr = 0, ctp_l1a = 0, ctp_mon = 0, ctp_test = 0;
  mult_t ctp_mult;
  logic ctp_busy, irq;
  logic [31:0] l2_ud, daq_ud, cfg_rdata, cfg_wdata = '0;
  logic l2_uctrl, l2_uwen, l2_lff = 0, daq_uctrl, daq_uwen, daq_lff = 0;
  logic cfg_we = 0, cfg_re = 0;
  logic [20:0] cfg_addr = '0;
  int checks = 0, failures = 0;
  int B = -100000;                           // BC of the current cycle
  typedef logic [N_MIOCT-1:0][N_SECTOR-1:0][SECT_W-1:0] bc_words_t;
  bc_words_t words [int];
  mult_t exp_mult [int];
  bit mult_check = 0, quiet = 0;
  int n_bb = 0, n_be = 0, n_sat = 0, n_zs = 0, n_lim = 0, n_lff = 0, n_busy = 0, n_mon = 0;
  int n_ovr = 0, n_test = 0, n_mult = 0, n_daq = 0, n_l2 = 0;
  logic [31:0] daq_q [$][$];                 // expected data part per event
  logic [31:0] l2_q [$][$];

  muctpi_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic wr(input int m, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {5'(m), a}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(input int m, input logic [15:0] a, output logic [31:0] d, input bit pop = 0);
    @(negedge clk); cfg_addr = {5'(m), a}; #1 d = cfg_rdata; cfg_re = pop;
    @(negedge clk); cfg_re = 0;
  endtask

  function automatic int lat(input int o, input int s); return (o + s) % 3; endfunction

  // reference multiplicity of one octant: one candidate removed per
  // overlapping pair, counts per threshold saturating at 7
  function automatic mult_t ref_oct(input logic [SECT_W-1:0] w [N_SECTOR], input bit count);
    int pt [N_SECTOR][2];
    logic [1:0] fl [N_SECTOR][2];
    bit rm [N_SECTOR][2];
    int best [N_SECTOR][2];
    int pa [2] = '{S_BA31, S_BA01}, pb [2] = '{S_BA32, S_BA02};
    mult_t r;
    for (int s = 0; s < N_SECTOR; s++) begin
      sector_word_t x = w[s];
      pt[s][0] = x.c0.pt; pt[s][1] = x.c1.pt;
      fl[s][0] = x.c0.ovl; fl[s][1] = x.c1.ovl;
      rm[s] = '{0, 0};
      for (int f = 0; f < 2; f++) begin
        best[s][f] = -1;
        for (int j = 0; j < 2; j++)
          if (fl[s][j][f] && pt[s][j] > 0 && (best[s][f] < 0 || pt[s][j] > pt[s][best[s][f]])) best[s][f] = j;
      end
    end
    for (int p = 0; p < 2; p++)
      if (best[pa[p]][0] >= 0 && best[pb[p]][0] >= 0) begin
        if (count) n_bb++;
        if (pt[pb[p]][best[pb[p]][0]] <= pt[pa[p]][best[pa[p]][0]]) rm[pb[p]][best[pb[p]][0]] = 1;
        else rm[pa[p]][best[pa[p]][0]] = 1;
      end
    for (int x = 0; x < 4; x++) begin
      int es = -1, ej = 0, ep = 0;
      for (int e = 0; e < 6; e++) begin
        int s = S_EC46 + e;
        if (BE_MAP_DEFAULT[x][e] && best[s][1] >= 0 && pt[s][best[s][1]] > ep) begin
          es = s; ej = best[s][1]; ep = pt[s][ej];
        end
      end
      if (best[x][1] >= 0 && es >= 0) begin
        if (count) n_be++;
        if (pt[x][best[x][1]] <= ep) rm[x][best[x][1]] = 1; else rm[es][ej] = 1;
      end
    end
    for (int t = 1; t <= N_THR; t++) begin
      int n = 0;
      for (int s = 0; s < N_SECTOR; s++)
        for (int j = 0; j < 2; j++) if (!rm[s][j] && pt[s][j] >= t) n++;
      r[t-1] = 3'((n > 7) ? 7 : n);
    end
    return r;
  endfunction

  function automatic void make_bc(input int b);
    int dens = (b % 16 == 0) ? 2 : 30;       // every 16th BC is busy
    mult_t tot = '0;
    bc_words_t bw = '0;
    for (int o = 0; o < N_MIOCT; o++) begin
      logic [SECT_W-1:0] ow [N_SECTOR];
      for (int s = 0; s < N_SECTOR; s++) begin
        sector_word_t x = sector_word_t'({$urandom});
        x.spare = '0;
        x.bcid = 3'((b % BC_PER_ORBIT + BC_PER_ORBIT) % BC_PER_ORBIT);
        if ($urandom % dens != 0) x.c0.pt = 0;
        if ($urandom % (2 * dens) != 0) x.c1.pt = 0;
        if ($urandom % 3 != 0) x.c0.ovl = 0;
        if ($urandom % 3 != 0) x.c1.ovl = 0;
        ow[s] = x; bw[o][s] = x;
      end
      tot = mult_add_sat(tot, ref_oct(ow, 1));
    end
    words[b] = bw;
    for (int k = 0; k < N_THR; k++) if (tot[k] == 3'd7) n_sat++;
    exp_mult[b] = tot;
  endfunction

  always @(posedge clk) B <= ctp_bcr ? -1 : B + 1;   // ctp_bcr reaches the modules one BC later

  always @(posedge clk) begin
    #2;
    if (!words.exists(B + 1)) make_bc(B + 1);
    for (int o = 0; o < N_MIOCT; o++)
      for (int s = 0; s < N_SECTOR; s++) begin
        automatic int b = B - lat(o, s);
        automatic bc_words_t bw = words.exists(b) ? words[b] : '0;
        sector_in[o][s] = quiet ? '0 : bw[o][s];
      end
  end

  // BC b: sampled at the end of cycle b (lat 0), at the CTP in cycle b + 7
  always @(negedge clk) if (mult_check && exp_mult.exists(B - 7)) begin
    chk(ctp_mult == exp_mult[B - 7], $sformatf("CTP multiplicity BC %0d: %h exp %h", B - 7, ctp_mult, exp_mult[B - 7]));
    n_mult++;
  end
  always @(negedge clk) if (ctp_busy) n_busy++;

  // L1A: expected read-out of the triggering BC t
  task automatic l1a_at(input bit mon, input int ev);
    int t;
    logic [31:0] dq [$], lq [$];
    rod_cand_t tc [$];
    @(negedge clk); ctp_l1a = 1; ctp_mon = mon; t = B - (LO + 4);
    @(negedge clk); ctp_l1a = 0; ctp_mon = 0;
    dq.push_back(32'(ev));
    dq.push_back(32'((t % BC_PER_ORBIT + BC_PER_ORBIT) % BC_PER_ORBIT));
    dq.push_back({14'h0, exp_mult[t]});
    for (int o = 0; o < N_MIOCT; o++)
      for (int b = t - 1; b <= t + 1; b++)
        for (int s = 0; s < N_SECTOR; s++) begin
          bc_words_t bw = words[b];
          sector_word_t x = bw[o][s];
          if (x.c0.pt == 0 && x.c1.pt == 0) n_zs++;
          for (int j = 0; j < 2; j++) begin
            cand_t c = j ? x.c1 : x.c0;
            if (c.pt != 0) begin
              rod_cand_t r;
              r.sector_id = {4'(o), 4'(s)}; r.pt = c.pt; r.roi = c.roi; r.ovl = c.ovl;
              r.cidx = 1'(j); r.in_trig = (b == t); r.bc = x.bcid;
              dq.push_back(cand_word(r));
              if (b == t) tc.push_back(r);
            end
          end
        end
    lq.push_back(32'(ev));
    lq.push_back(dq[1]);
    lq.push_back(dq[2]);
    for (int p = 7; p >= 1; p--)
      foreach (tc[i]) if (tc[i].pt == 3'(p) && lq.size() < 3 + LIM) lq.push_back(cand_word(tc[i]));
    if (tc.size() > LIM) n_lim++;
    daq_q.push_back(dq);
    l2_q.push_back(lq);
  endtask

  // S-Link sinks
  logic [31:0] daq_ev [$], l2_ev [$];
  task automatic check_event(input logic [31:0] got [$], ref logic [31:0] q [$][$], input string which);
    logic [31:0] e [$];
    if (q.size() == 0) begin chk(0, {which, " event not expected"}); return; end
    e = q.pop_front();
    chk(got.size() == e.size() - 3 + 14, $sformatf("%s event %0d length %0d exp %0d", which, e[0], got.size(), e.size() + 11));
    chk(got[5] == e[0] && got[6] == e[1], $sformatf("%s L1ID/BCID %0d/%0d exp %0d/%0d", which, got[5], got[6], e[0], e[1]));
    // the last events of the L1A burst may carry the pipeline-overrun flag
    chk(got[9] == 0 || (e[0] >= NEV && got[9] == 1), $sformatf("%s event %0d status %h", which, e[0], got[9]));
    if (got[9] == 1) n_ovr++;
    chk(got[10] == e[2], $sformatf("%s multiplicity %h exp %h", which, got[10], e[2]));
    for (int i = 3; i < e.size() && i + 8 < got.size(); i++)
      chk(got[i + 8] == e[i], $sformatf("%s event %0d candidate %0d: %h exp %h", which, e[0], i - 3, got[i + 8], e[i]));
  endtask
  always @(negedge clk) if (rst_n) begin
    if (daq_uwen) begin
      if (daq_uctrl && daq_ud == 32'hE0F00000) begin check_event(daq_ev, daq_q, "DAQ"); n_daq++; daq_ev = {}; end
      else if (!daq_uctrl) daq_ev.push_back(daq_ud);
    end
    if (l2_uwen) begin
      if (l2_uctrl && l2_ud == 32'hE0F00000) begin check_event(l2_ev, l2_q, "L2"); n_l2++; l2_ev = {}; end
      else if (!l2_uctrl) l2_ev.push_back(l2_ud);
    end
    if (daq_lff) n_lff++;
  end
  always @(posedge clk) #2 daq_lff = ($urandom % 8 == 0);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int ev = 0, nflag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < N_MIOCT; o++) begin
      wr(o, 16'h0000, {8'h0, 8'(LO), 4'h0, 4'b0101, 8'h1D});   // window 1+1, zs, checks, overlap
      wr(o, 16'h0003, 32'd4);
      for (int s = 0; s < N_SECTOR; s++) if (lat(o, s) != 2) wr(o, 16'h0010 + 16'(s), 32'(2 - lat(o, s)));
    end
    wr(16, 16'h0000, 32'(LC));
    wr(16, 16'h0001, 32'd6);
    wr(17, 16'h0000, (LIM << 8) | 32'b10000);            // limit 8, monitor flagged events
    rd(0, 16'h0000, d); chk(d[23:16] == 8'(LO), "octant register read back");
    @(negedge clk); ctp_bcr = 1; ctp_ecr = 1;
    @(negedge clk); ctp_bcr = 0; ctp_ecr = 0;
    repeat (LO + 20) @(posedge clk);
    mult_check = 1;
    for (int i = 0; i < NEV; i++) begin
      automatic bit mon = (i % 5 == 2);
      if (mon) nflag++;
      l1a_at(mon, ev); ev++;
      repeat (150 + $urandom % 200) @(posedge clk);
    end
    // burst of four L1As: BUSY
    for (int i = 0; i < 4; i++) begin l1a_at(0, ev); ev++; end
    repeat (3000) @(posedge clk);
    chk(daq_q.size() == 0 && l2_q.size() == 0, $sformatf("all events sent (%0d, %0d left)", daq_q.size(), l2_q.size()));
    // monitoring FIFO holds the flagged events
    for (int k = 0; k < nflag; k++) begin
      logic [31:0] w0, w2;
      rd(17, 16'h0008, w0, 1);
      rd(17, 16'h0008, d, 1);
      rd(17, 16'h0008, w2, 1);
      chk(w0[31:28] == 4'hE && w0[27] && w0[18:0] == 19'(2 + 5 * k), $sformatf("monitored event %h", w0));
      for (int i = 0; i < int'(w2); i++) rd(17, 16'h0008, d, 1);
      n_mon++;
    end
    rd(17, 16'h0009, d); chk(d[16], "monitoring FIFO empty after the flagged events");
    // wrong delay: BCID errors
    mult_check = 0;
    wr(5, 16'h0010, 32'd0);
    repeat (20) @(posedge clk);
    rd(5, 16'h0007, d); chk(d > 0, "BCID errors counted");
    // test memories: inputs silent, octant 3 sector BA01 plays a pT-6
    // candidate from word 0 when the test signal comes; test signal at the
    // CTP sampled at edge T -> backplane T -> play-back restarts T+1 -> word
    // 0 read for T+2 -> aligned (delay 0) T+3 -> count T+4 -> sum T+5 ->
    // CTP T+6
    begin
      automatic int t0, first = -1, hits = 0;
      automatic logic [31:0] nerr = d;
      quiet = 1;
      wr(3, 16'h0000, 32'h0000_0019);              // BCID check off
      for (int a = 0; a < 256; a++) wr(3, 16'h8000 | 16'(S_BA01 << 8) | 16'(a), (a == 0) ? 32'h0000_C000 : 32'h0);
      wr(3, 16'h0002, 32'(1 << S_BA01));
      repeat (300) @(posedge clk);
      @(negedge clk); ctp_test = 1; t0 = B + 1;
      @(negedge clk); ctp_test = 0;
      while (B < t0 + 200) begin
        @(negedge clk);
        if (ctp_mult != 0) begin
          hits++;
          if (first < 0) first = B - t0;
          chk(ctp_mult == {6{3'd1}}, $sformatf("test candidate counted once at every threshold: %h", ctp_mult));
        end
      end
      chk(first == 6 && hits == 1, $sformatf("test memory play-back at the CTP after %0d edges, %0d times", first, hits));
      if (first == 6) n_test++;
      d = nerr;
    end
    $display("BCs checked %0d, events DAQ %0d L2 %0d; barrel/barrel %0d barrel/end-cap %0d saturated %0d zero-suppressed %0d L2-limited %0d link-full %0d monitored %0d busy %0d overrun flags %0d test play-backs %0d BCID errors %0d",
             n_mult, n_daq, n_l2, n_bb, n_be, n_sat, n_zs, n_lim, n_lff, n_mon, n_busy, n_ovr, n_test, d);
    chk(n_daq == NEV + 4 && n_l2 == NEV + 4, "every event on both links");
    chk(n_mult > 1000, "multiplicity checked");
    chk(n_bb > 0, "barrel/barrel overlap");
    chk(n_be > 0, "barrel/end-cap overlap");
    chk(n_sat > 0, "saturation");
    chk(n_zs > 0, "zero suppression");
    chk(n_lim > 0, "Level-2 limit");
    chk(n_lff > 0, "link full");
    chk(n_mon > 0, "monitoring");
    chk(n_busy > 0, "BUSY");
    chk(n_ovr > 0, "pipeline overrun flagged in the burst");
    chk(n_test > 0, "test memory play-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
