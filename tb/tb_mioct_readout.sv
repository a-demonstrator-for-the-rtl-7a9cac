// tb_mioct_readout: feeds random sector words (mostly empty, BC bits set)
// with a BC number, issues Level-1 Accepts and reads the read-out and
// monitoring FIFOs. Each fragment is compared with one built from a record
// of the words given at each clock edge: header, the window of BCs around
// the triggering one, zero suppression, trailer word count. A final burst
// of back-to-back L1As must raise busy and lose events, flagged in a
// trailer, and the pipeline rows of the last ones are overwritten before
// they are read, which must be flagged too.
//
// The window of up to two BCs each side and zero suppression follow the
// document; fragment layout, queue sizes and error bits are this design's.
// No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mioct_readout;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SECTOR-1:0][SECT_W-1:0] sectors = '0;
  logic [BCID_W-1:0] bcid = '0;
  logic l1a = 1'b0, mon_flag = 1'b0, zs_en = 1'b1, mon_en = 1'b1;
  logic [EVID_W-1:0] evid = '0;
  logic [7:0] latency = 8'd20;
  logic [1:0] win_pre = 2'd1, win_post = 2'd2;
  logic ro_rd, ro_empty, frag_done, mon_rd, mon_empty, busy;
  bus_word_t ro_rdata, mon_rdata;
  logic [9:0] mon_count;
  int checks = 0, failures = 0, cyc = 0;
  int n_ovr = 0, n_zs = 0, n_busy = 0, n_lost_flag = 0, n_frag = 0, n_mon = 0, n_win = 0;
  logic [BCID_W-1:0] hist_bc [int];
  logic [N_SECTOR-1:0][SECT_W-1:0] hist [int];
  bus_word_t exp_frag [int][$];
  bit burst = 0, reading = 1;

  mioct_readout #(.PIPE_DEPTH(256), .L1AQ_DEPTH(8), .RO_DEPTH(1024), .MON_DEPTH(512)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // stimulus and record
  always @(posedge clk) begin
    hist[cyc] = sectors; hist_bc[cyc] = bcid;
    if (l1a) begin
      automatic int trig = cyc - 1 - int'(latency);
      automatic bus_word_t f [$];
      automatic int nw = 0;
      f.push_back('{snbr: SNBR_HEADER, data: {mon_flag, hist_bc[trig], evid[18:0]}});
      for (int b = trig - int'(win_pre); b <= trig + int'(win_post); b++)
        for (int s = 0; s < N_SECTOR; s++) begin
          automatic sector_word_t w = hist[b][s];
          if (zs_en && w.c0.pt == 0 && w.c1.pt == 0) n_zs++;
          else begin f.push_back('{snbr: 4'(s), data: hist[b][s]}); nw++; end
        end
      f.push_back('{snbr: SNBR_TRAILER, data: 32'(nw)});
      exp_frag[int'(evid[18:0])] = f;
    end
    cyc <= cyc + 1;
    if (busy) n_busy++;
  end
  always @(posedge clk) begin
    #2;
    bcid = (bcid == BCID_W'(BC_PER_ORBIT - 1)) ? '0 : bcid + 1'b1;
    if (l1a) evid = evid + 1'b1;
    for (int s = 0; s < N_SECTOR; s++) begin
      automatic sector_word_t w = '0;
      w.bcid = bcid[2:0];
      if ($urandom % 5 == 0) begin w.c0.pt = 3'(1 + $urandom % 6); w.c0.roi = 8'($urandom); end
      if ($urandom % 9 == 0) begin w.c1.pt = 3'(1 + $urandom % 6); w.c1.ovl = 2'($urandom); end
      sectors[s] = w;
    end
  end

  // read-out FIFO consumer
  bus_word_t cur [$];
  bus_word_t mcur [$];
  assign ro_rd  = reading && !ro_empty;
  assign mon_rd = !mon_empty;
  always @(posedge clk) if (rst_n) begin
    if (ro_rd) begin
      cur.push_back(ro_rdata);
      if (ro_rdata.snbr == SNBR_TRAILER) begin
        automatic int ev = int'(cur[0].data[18:0]);
        n_frag++;
        chk(cur[0].snbr == SNBR_HEADER, "header first");
        if (ro_rdata.data[29]) n_lost_flag++;
        if (ro_rdata.data[28]) n_ovr++;
        if (!exp_frag.exists(ev)) chk(0, $sformatf("unexpected event %0d", ev));
        else if (burst && ro_rdata.data[28]) ;   // pipeline overrun: content not valid
        else begin
          chk(cur.size() == exp_frag[ev].size(), $sformatf("event %0d length %0d exp %0d", ev, cur.size(), exp_frag[ev].size()));
          for (int i = 0; i < cur.size() - 1 && i < exp_frag[ev].size(); i++)
            chk(cur[i] == exp_frag[ev][i], $sformatf("event %0d word %0d: %h exp %h", ev, i, cur[i], exp_frag[ev][i]));
          chk(cur[cur.size()-1].data[11:0] == exp_frag[ev][exp_frag[ev].size()-1].data[11:0], "trailer count");
          if (!burst) chk(cur[cur.size()-1].data[31:28] == 0, "no error flags");
        end
        cur = {};
      end
    end
    if (mon_rd) begin
      mcur.push_back(mon_rdata);
      if (mon_rdata.snbr == SNBR_TRAILER) begin
        automatic int ev = int'(mcur[0].data[18:0]);
        n_mon++;
        if (exp_frag.exists(ev) && !mon_rdata.data[28]) chk(mcur.size() == exp_frag[ev].size(), "monitor copy length");
        mcur = {};
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trigger(input bit mon);
    @(negedge clk); l1a = 1'b1; mon_flag = mon;
    @(negedge clk); l1a = 1'b0; mon_flag = 1'b0;
  endtask

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) @(posedge clk);
    for (int phase = 0; phase < 4; phase++) begin
      @(negedge clk);
      win_pre = 2'(phase % 3); win_post = 2'((phase + 1) % 3); zs_en = (phase != 2);
      latency = 8'(20 + 30 * phase);
      if (win_pre + win_post > 0) n_win++;
      for (int i = 0; i < 25; i++) begin
        trigger($urandom % 4 == 0); sent++;
        repeat (20 + $urandom % 150) @(posedge clk);
      end
    end
    repeat (500) @(posedge clk);
    chk(n_frag == sent, $sformatf("all fragments received %0d of %0d", n_frag, sent));
    // burst: stop reading, fire L1As back to back
    burst = 1; reading = 0;
    @(negedge clk); l1a = 1'b1;
    repeat (14) @(negedge clk);
    l1a = 1'b0;
    repeat (200) @(posedge clk);
    reading = 1;
    repeat (2000) @(posedge clk);
    $display("fragments %0d monitored %0d zero-suppressed %0d busy cycles %0d lost flags %0d overruns %0d",
             n_frag, n_mon, n_zs, n_busy, n_lost_flag, n_ovr);
    chk(n_busy > 0, "busy seen");
    chk(n_lost_flag > 0, "lost L1A flagged");
    chk(n_ovr > 0, "pipeline overrun flagged");
    chk(n_zs > 0 && n_mon > 0 && n_win > 0, "zero suppression, monitoring and windows exercised");
    chk(n_frag < sent + 14, "events lost in burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
