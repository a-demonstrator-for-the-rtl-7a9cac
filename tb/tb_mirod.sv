// tb_mirod: read-out driver with a behavioural backplane. For each event 17
// fragments (CTP interface first, then 16 octant modules with random sector
// words) answer the token. Checked at the outputs: the data-acquisition
// S-Link carries every candidate in extraction order, the Level-2 S-Link
// carries the triggering-BC candidates sorted by pT and cut to the limit,
// the monitoring FIFO read through the register bus holds the events with
// the monitoring flag, and the interrupt rises at the watermark. The
// analyser, set to the DAQ link, must hold that link's activity with the
// right time stamps until it is full. Last, one more event is built as
// play-back entries, loaded through the registers and replayed with the
// backplane inputs idle; it must come out on both links like the others.
//
// The three branches and their rules follow the document; register map,
// ROD layout details and thresholds are this design's. No ports; ends with
// a TB_RESULT line and has a watchdog.
module tb_mirod;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ready = 0, dvld = 0, berr = 0, tk_back = 0, tk_out, busy, irq;
  bus_word_t bus = '0;
  logic [31:0] l2_ud, daq_ud, cfg_rdata, cfg_wdata = '0;
  logic l2_uctrl, l2_uwen, l2_lff = 0, daq_uctrl, daq_uwen, daq_lff = 0;
  logic cfg_we = 0, cfg_re = 0;
  logic [15:0] cfg_addr = '0;
  int checks = 0, failures = 0;
  logic [31:0] daq_exp [$], l2_exp [$];
  int n_daq_ev = 0, n_l2_ev = 0, n_mon = 0, n_lim = 0, n_lff = 0;
  localparam int LIM = 5;

  mirod dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // S-Link sinks: keep the data words (nine header, status, multiplicity and three trailer words skipped)
  logic [31:0] daq_ev [$], l2_ev [$];
  always @(negedge clk) if (rst_n) begin
    if (daq_uwen) begin
      if (daq_uctrl && daq_ud == 32'hE0F00000) begin
        n_daq_ev++;
        chk(daq_ev.size() >= 14, "DAQ event length");
        for (int i = 11; i < daq_ev.size() - 3; i++) begin
          chk(daq_exp.size() > 0 && daq_ev[i] == daq_exp[0], $sformatf("DAQ candidate %h exp %h", daq_ev[i], daq_exp[0]));
          if (daq_exp.size() > 0) void'(daq_exp.pop_front());
        end
        daq_ev = {};
      end else if (!daq_uctrl) daq_ev.push_back(daq_ud);
    end
    if (l2_uwen) begin
      if (l2_uctrl && l2_ud == 32'hE0F00000) begin
        n_l2_ev++;
        for (int i = 11; i < l2_ev.size() - 3; i++) begin
          chk(l2_exp.size() > 0 && l2_ev[i] == l2_exp[0], $sformatf("L2 candidate %h exp %h", l2_ev[i], l2_exp[0]));
          if (l2_exp.size() > 0) void'(l2_exp.pop_front());
        end
        l2_ev = {};
      end else if (!l2_uctrl) l2_ev.push_back(l2_ud);
    end
    if (daq_lff) n_lff++;
  end
  always @(posedge clk) #2 daq_lff = ($urandom % 6 == 0);

  // analyser reference: every active cycle of the DAQ link after enabling
  int C = 0, t_en = -1;
  logic [59:0] ana_exp [$];
  always @(posedge clk) begin
    if (t_en >= 0 && C > t_en && {daq_lff, daq_uwen, daq_uctrl} != 0 && ana_exp.size() < 1024)
      ana_exp.push_back({16'(C - t_en - 1), 5'b0, daq_lff, daq_uwen, daq_uctrl, 4'b0, daq_ud});
    C <= C + 1;
  end

  // pb: build the event as play-back entries {berr, tk_back, dvld, ready, bus} in pb_q
  logic [39:0] pb_q [$];
  task automatic run_event(input int ev, input bit mon, input bit pb = 0);
    automatic logic [11:0] bc = 12'($urandom % 3564);
    automatic rod_cand_t trig_c [$];
    if (pb) repeat (4) pb_q.push_back({4'b0001, 36'h0});
    else begin
      @(negedge clk); ready = 1;
      wait (tk_out);
      ready = 0;
    end
    for (int o = 0; o <= N_MIOCT; o++) begin
      automatic bus_word_t f [$];
      f.push_back('{snbr: SNBR_HEADER, data: {(o == 0) ? mon : 1'b0, bc, 19'(ev)}});
      if (o == 0) f.push_back('{snbr: 4'h0, data: {2'b00, bc, 18'($urandom)}});
      else
        for (int s = 0; s < N_SECTOR; s++) if ($urandom % 4 == 0) begin
          automatic sector_word_t x = sector_word_t'($urandom);
          x.bcid = bc[2:0];
          if ($urandom % 2) x.c1.pt = 0;
          f.push_back('{snbr: 4'(s), data: x});
          for (int j = 0; j < 2; j++) begin
            automatic cand_t c = j ? x.c1 : x.c0;
            if (c.pt != 0) begin
              automatic rod_cand_t r;
              r.sector_id = {4'(o - 1), 4'(s)}; r.pt = c.pt; r.roi = c.roi; r.ovl = c.ovl;
              r.cidx = 1'(j); r.in_trig = 1'b1; r.bc = x.bcid;
              daq_exp.push_back(cand_word(r));
              trig_c.push_back(r);
            end
          end
        end
      f.push_back('{snbr: SNBR_TRAILER, data: 32'(f.size() - 1)});
      foreach (f[i])
        if (pb) pb_q.push_back({2'b00, o == N_MIOCT && i == f.size() - 1, 2'b10, f[i]});
        else begin
          @(negedge clk); dvld = 1; bus = f[i];
          tk_back = (o == N_MIOCT && i == f.size() - 1);
        end
      if (pb) pb_q.push_back('0);
      else begin @(negedge clk); dvld = 0; bus = '0; tk_back = 0; end
    end
    begin
      automatic int k = 0;
      for (int p = 7; p >= 1; p--)
        foreach (trig_c[i]) if (trig_c[i].pt == 3'(p) && k < LIM) begin
          l2_exp.push_back(cand_word(trig_c[i])); k++;
        end
      if (trig_c.size() > LIM) n_lim++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(16'h0000, (LIM << 8) | 32'b10000);      // limit, monitor flagged events
    wr(16'h0005, 32'd10);                       // watermark
    // analyser on the DAQ link: written at edge E, restarts at edge E+1
    @(negedge clk); cfg_we = 1; cfg_addr = 16'h000A; cfg_wdata = 32'h5; t_en = C + 1;
    @(negedge clk); cfg_we = 0;
    for (int ev = 0; ev < 12; ev++) begin
      run_event(ev, ev % 4 == 1);
      repeat (20) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    chk(n_daq_ev == 12 && n_l2_ev == 12, $sformatf("events on both links %0d %0d", n_daq_ev, n_l2_ev));
    chk(daq_exp.size() == 0 && l2_exp.size() == 0, "all candidates sent");
    chk(irq, "interrupt at watermark");
    // read monitoring FIFO: 3 flagged events (1, 5, 9)
    for (int k = 0; k < 3; k++) begin
      logic [31:0] w0, w2;
      @(negedge clk); cfg_addr = 16'h0008; #1 w0 = cfg_rdata; cfg_re = 1;
      @(negedge clk); cfg_re = 0;
      @(negedge clk); cfg_re = 1; @(negedge clk); cfg_re = 0;
      #1 w2 = cfg_rdata; cfg_re = 1; @(negedge clk); cfg_re = 0;
      chk(w0[31:28] == 4'hE && w0[27] && w0[18:0] == 19'(1 + 4 * k), $sformatf("monitored event %h", w0));
      for (int i = 0; i < int'(w2); i++) begin @(negedge clk); cfg_re = 1; @(negedge clk); cfg_re = 0; end
      n_mon++;
    end
    cfg_addr = 16'h0009; #1 chk(cfg_rdata[16] == 1'b1, "monitoring FIFO empty after three events");
    chk(n_lim > 0 && n_lff > 0, "limit and link-full exercised");
    // analyser content: the DAQ link's activity, time-stamped, until full;
    // disabled first so that read-back frees no room for new samples
    @(negedge clk); cfg_we = 1; cfg_addr = 16'h000A; cfg_wdata = 32'h4; t_en = -1;
    @(negedge clk); cfg_we = 0;
    cfg_addr = 16'h000D; #1 chk(cfg_rdata[10:0] == 11'(ana_exp.size()) && ana_exp.size() == 1024,
                               $sformatf("analyser holds %0d entries, expected %0d", cfg_rdata[10:0], ana_exp.size()));
    while (ana_exp.size() > 0) begin
      automatic logic [59:0] e = ana_exp.pop_front();
      automatic int idx = 1024 - ana_exp.size() - 1;
      automatic logic [31:0] lo;
      @(negedge clk); cfg_addr = 16'h000B; #1 lo = cfg_rdata;
      @(negedge clk); cfg_addr = 16'h000C; #1 chk({cfg_rdata[27:0], lo} == e, $sformatf("analyser entry %0d: %h exp %h", idx, {cfg_rdata[27:0], lo}, e));
      cfg_re = 1; @(negedge clk); cfg_re = 0;
    end
    cfg_addr = 16'h000D; #1 chk(cfg_rdata[16] == 1'b1, "analyser read out");
    // play-back: one event loaded into the memory and replayed with the
    // backplane inputs idle must come out on both links
    run_event(12, 1'b0, 1'b1);
    foreach (pb_q[a]) begin
      wr(16'h000F, pb_q[a][31:0]);
      wr(16'h2000 + 16'(a), 32'(pb_q[a][39:32]));
    end
    wr(16'h000E, (32'(pb_q.size()) << 16) | 32'h3);   // mode, length, start
    cfg_addr = 16'h000E; #1 chk(cfg_rdata[1], "play-back running");
    repeat (pb_q.size() + 3000) @(posedge clk);
    @(negedge clk); #1 chk(!cfg_rdata[1], "play-back finished");
    chk(n_daq_ev == 13 && n_l2_ev == 13, $sformatf("play-back event on both links %0d %0d", n_daq_ev, n_l2_ev));
    chk(daq_exp.size() == 0 && l2_exp.size() == 0, "play-back candidates sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
