// tb_mirod_monitor: random events through the monitoring branch under each
// selection criterion alone, in OR and in AND combinations. The FIFO
// content read back must be exactly the selected events in the stored
// layout; the watermark interrupt must follow the FIFO level, and events
// that do not fit into the (reduced) FIFO must be counted as dropped.
//
// The five criteria and the watermark interrupt follow the document; the
// AND/OR combination and the stored layout are this design's. No ports;
// ends with a TB_RESULT line and has a watchdog.
module tb_mirod_monitor;
  import muctpi_pkg::*;
  localparam int MD = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] crit_en = '0;
  logic crit_and = 0;
  logic [15:0] nth = 16'd3, dropped;
  logic [11:0] bcid_sel = '0;
  logic [18:0] evid_sel = '0;
  logic [8:0] watermark = '0, mon_count;
  logic in_valid = 0, in_ready, mon_rd = 0, mon_empty, irq;
  ev_item_t in_item = '0;
  logic [31:0] mon_rdata;
  int checks = 0, failures = 0, nth_cnt = 0, n_sel = 0, n_irq = 0;
  int n_crit [5] = '{default: 0};
  logic [31:0] exp_q [$];

  mirod_monitor #(.MON_DEPTH(MD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic push(input ev_item_t x);
    @(negedge clk); in_valid = 1; in_item = x;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0;
  endtask

  task automatic drain();
    while (!mon_empty) begin
      @(negedge clk);
      chk(exp_q.size() > 0 && mon_rdata == exp_q[0], $sformatf("fifo %h exp %h", mon_rdata, exp_q[0]));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      mon_rd = 1;
      @(negedge clk); mon_rd = 0;
    end
    chk(exp_q.size() == 0, "fifo holds all selected words");
    exp_q = {};
  endtask

  task automatic send_event(input int ev, input bit mon);
    automatic ev_item_t h = '0;
    automatic int n = $urandom % 6;
    automatic bit m [5];
    automatic bit sel;
    automatic rod_cand_t c [$];
    h.is_hdr = 1;
    h.hdr.evid = 19'(ev); h.hdr.bcid = 12'($urandom % 8); h.hdr.mult = mult_t'($urandom);
    h.hdr.mon = mon; h.hdr.err = 4'($urandom); h.hdr.ncand = 12'(n);
    m[0] = 1;
    m[1] = (nth_cnt + 1 >= int'(nth));
    nth_cnt = m[1] ? 0 : nth_cnt + 1;
    m[2] = (h.hdr.bcid == bcid_sel);
    m[3] = (h.hdr.evid == evid_sel);
    m[4] = mon;
    sel = crit_and;
    if (crit_and) begin
      for (int k = 0; k < 5; k++) if (crit_en[k] && !m[k]) sel = 0;
      if (crit_en == 0) sel = 0;
    end else
      for (int k = 0; k < 5; k++) if (crit_en[k] && m[k]) sel = 1;
    for (int k = 0; k < 5; k++) if (sel && crit_en[k] && m[k]) n_crit[k]++;
    for (int i = 0; i < n; i++) c.push_back(rod_cand_t'($urandom));
    if (sel) begin
      n_sel++;
      exp_q.push_back({4'hE, h.hdr.mon, h.hdr.err, 4'h0, h.hdr.evid});
      exp_q.push_back({2'b00, h.hdr.bcid, h.hdr.mult});
      exp_q.push_back(32'(n));
      foreach (c[i]) exp_q.push_back(cand_word(c[i]));
    end
    push(h);
    foreach (c[i]) begin
      automatic ev_item_t ci = '0;
      ci.cand = c[i];
      push(ci);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    chk(irq == (watermark != 0 && mon_count >= watermark), "interrupt follows watermark");
    if (irq) n_irq++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    watermark = 9'd20;
    for (int mode = 0; mode < 9; mode++) begin
      @(negedge clk);
      crit_and = (mode >= 7);
      case (mode)
        0: crit_en = 5'b00001;
        1: crit_en = 5'b00010;
        2: crit_en = 5'b00100;
        3: crit_en = 5'b01000;
        4: crit_en = 5'b10000;
        5: crit_en = 5'b10100;   // OR of BC number and flag
        6: crit_en = 5'b00000;
        7: crit_en = 5'b10100;   // AND of BC number and flag
        default: crit_en = 5'b10010;
      endcase
      bcid_sel = 12'($urandom % 8); evid_sel = 19'(ev + 5); nth = 16'(2 + mode % 3);
      for (int i = 0; i < 30; i++) begin
        send_event(ev, $urandom % 2);
        ev++;
      end
      repeat (5) @(posedge clk);
      drain();
    end
    // FIFO overflow: select all, do not read
    @(negedge clk); crit_en = 5'b00001; crit_and = 0;
    begin
      automatic logic [15:0] d0 = dropped;
      for (int i = 0; i < 120; i++) begin
        automatic ev_item_t h = '0;
        h.is_hdr = 1; h.hdr.ncand = 12'd0;
        push(h);
      end
      chk(dropped > d0, "events dropped when FIFO full");
      chk(mon_count > 9'(MD - 3), "FIFO filled");
    end
    chk(n_irq > 0, "interrupt raised");
    foreach (n_crit[k]) chk(n_crit[k] > 0, $sformatf("criterion %0d selected events", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
