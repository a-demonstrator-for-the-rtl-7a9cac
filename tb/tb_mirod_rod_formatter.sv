// tb_mirod_rod_formatter: random events through the ROD formatter while the
// S-Link raises its link-full flag at random. The words written must be,
// in order: begin control word, the nine header words, status word,
// multiplicity word, one word per candidate, three trailer words with the
// right counts, end control word; nothing may be written while lff is high.
//
// The use of the ROD event format and of S-Link follows the document; the
// exact word layout used is this design's reading of that format. No
// ports; ends with a TB_RESULT line and has a watchdog.
module tb_mirod_rod_formatter;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] source_id = 32'h0076_0001, run_no = 32'd4711, ud;
  logic in_valid = 0, in_ready, uctrl, uwen, lff = 0;
  ev_item_t in_item = '0;
  int checks = 0, failures = 0, n_lff = 0, n_words = 0;
  logic [32:0] exp_q [$];

  mirod_rod_formatter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (lff) begin chk(!uwen, "no write while link full"); n_lff++; end
    if (uwen) begin
      n_words++;
      chk(exp_q.size() > 0 && {uctrl, ud} == exp_q[0], $sformatf("word %h exp %h", {uctrl, ud}, exp_q[0]));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  always @(posedge clk) #2 lff = ($urandom % 5 == 0);

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
    for (int ev = 0; ev < 200; ev++) begin
      automatic ev_item_t h = '0;
      automatic int n = (ev % 7 == 0) ? 0 : $urandom % 20;
      h.is_hdr = 1;
      h.hdr.evid = 19'(ev); h.hdr.bcid = 12'($urandom); h.hdr.mult = mult_t'($urandom);
      h.hdr.mon = 1'($urandom); h.hdr.err = 4'($urandom); h.hdr.ncand = 12'(n);
      exp_q.push_back({1'b1, 32'hB0F00000});
      exp_q.push_back({1'b0, 32'hEE1234EE});
      exp_q.push_back({1'b0, 32'd9});
      exp_q.push_back({1'b0, 32'h03000000});
      exp_q.push_back({1'b0, source_id});
      exp_q.push_back({1'b0, run_no});
      exp_q.push_back({1'b0, 32'(ev)});
      exp_q.push_back({1'b0, 32'(h.hdr.bcid)});
      exp_q.push_back({1'b0, 32'h0});
      exp_q.push_back({1'b0, 27'h0, h.hdr.mon, h.hdr.err});
      exp_q.push_back({1'b0, 28'h0, h.hdr.err});
      exp_q.push_back({1'b0, 14'h0, h.hdr.mult});
      push(h);
      for (int i = 0; i < n; i++) begin
        automatic ev_item_t c = '0;
        c.cand = rod_cand_t'($urandom);
        exp_q.push_back({1'b0, 2'b00, c.cand.in_trig, c.cand.cidx, c.cand.ovl, c.cand.pt,
                         c.cand.sector_id, c.cand.roi, c.cand.bc, 4'h0});
        push(c);
      end
      exp_q.push_back({1'b0, 32'd1});
      exp_q.push_back({1'b0, 32'(n + 1)});
      exp_q.push_back({1'b0, 32'd0});
      exp_q.push_back({1'b1, 32'hE0F00000});
    end
    repeat (100) @(posedge clk);
    chk(exp_q.size() == 0, "all words written");
    chk(n_lff > 0, "link full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
