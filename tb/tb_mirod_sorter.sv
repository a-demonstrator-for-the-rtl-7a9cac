// tb_mirod_sorter: random events of 0..40 candidates (about two thirds in
// the triggering BC) go through the Level-2 sorter with random limits and
// random output stalls. The output must be the header with the reduced
// count and the triggering-BC candidates in descending pT, equal pT in
// arrival order, cut to min(limit, list size).
//
// Descending pT and the limit follow the document; stability for equal pT
// and the Level-2 restriction to the triggering BC are this design's. No
// ports; ends with a TB_RESULT line and has a watchdog.
module tb_mirod_sorter;
  import muctpi_pkg::*;
  localparam int NM = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] l2_max = 5'd16;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  ev_item_t in_item = '0, out_item;
  int checks = 0, failures = 0, n_limited = 0, n_full = 0;
  ev_item_t exp_q [$];

  mirod_sorter #(.N_MAX(NM)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      chk(exp_q.size() > 0 && out_item == exp_q[0], $sformatf("item %h exp %h pt %0d exp %0d trig %0d", out_item, exp_q[0], out_item.cand.pt, exp_q[0].cand.pt, out_item.cand.in_trig));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  always @(posedge clk) #2 out_ready = ($urandom % 4 != 0);

  task automatic push(input ev_item_t x);
    @(negedge clk); in_valid = 1; in_item = x;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0;
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
    for (int ev = 0; ev < 300; ev++) begin
      automatic int n = $urandom % 41;
      automatic rod_cand_t c [$];
      automatic rod_cand_t sorted [$];
      automatic ev_item_t h = '0;
      automatic int lim = 1 + $urandom % 16;
      automatic int keep;
      wait (exp_q.size() == 0);
      @(negedge clk); l2_max = 5'(lim);
      h.is_hdr = 1; h.hdr.evid = 19'(ev); h.hdr.ncand = 12'(n);
      for (int i = 0; i < n; i++) begin
        automatic rod_cand_t x = rod_cand_t'($urandom);
        x.pt = 3'(1 + $urandom % 6);
        x.in_trig = ($urandom % 3 != 0);
        c.push_back(x);
      end
      // reference: stable sort by pt descending (selection by pt value)
      for (int p = 6; p >= 1; p--)
        foreach (c[i]) if (c[i].in_trig && c[i].pt == 3'(p)) sorted.push_back(c[i]);
      if (sorted.size() > NM) n_full++;
      keep = (sorted.size() < lim) ? sorted.size() : lim;
      if (keep < sorted.size()) n_limited++;
      begin
        automatic ev_item_t eh = h;
        eh.hdr.ncand = 12'(keep);
        exp_q.push_back(eh);
        for (int i = 0; i < keep; i++) begin
          automatic ev_item_t ec = '0;
          ec.cand = sorted[i];
          exp_q.push_back(ec);
        end
      end
      push(h);
      foreach (c[i]) begin
        automatic ev_item_t ci = '0;
        ci.cand = c[i];
        push(ci);
      end
    end
    repeat (200) @(posedge clk);
    chk(exp_q.size() == 0, "all items out");
    chk(n_limited > 0 && n_full > 0, "limit and list overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
