// tb_mirod_token_master: a behavioural chain of 17 slaves answers the token
// with random fragments. The master must wait for READY and for room, send
// the token, pass every bus word on with the index of its fragment, and
// close the event with the right error flags: none for a clean event,
// ERROR line, missing fragment, token that never returns, and a word
// outside a header/trailer frame.
//
// Token after READY and the error checks follow the document; the timeout,
// fragment count and framing rules are this design's. No ports; ends with
// a TB_RESULT line and has a watchdog.
module tb_mirod_token_master;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ready = 0, dvld = 0, berr = 0, tk_back = 0, space_ok = 1;
  bus_word_t bus = '0, w;
  logic tk_out, w_valid, ev_end, busy;
  logic [4:0] w_src;
  logic [3:0] ev_err;
  int checks = 0, failures = 0;
  bus_word_t exp_w [$];
  int exp_src [$];
  int n_end = 0;
  logic [3:0] last_err;

  mirod_token_master #(.N_FRAG(17), .TIMEOUT(300)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (w_valid) begin
      chk(exp_w.size() > 0 && w == exp_w[0] && int'(w_src) == exp_src[0], "word and source");
      if (exp_w.size() > 0) begin void'(exp_w.pop_front()); void'(exp_src.pop_front()); end
    end
    if (ev_end) begin n_end++; last_err = ev_err; end
  end

  // slaves: nfrag fragments, optional ERROR, optional unframed word, optional no return
  task automatic serve(input int nfrag, input bit raise_err, input bit unframed, input bit no_return);
    wait (tk_out);
    @(negedge clk);
    for (int f = 0; f < nfrag; f++) begin
      automatic int n = $urandom % 4;
      for (int i = 0; i < n + 2; i++) begin
        automatic bus_word_t x;
        x.data = $urandom;
        x.snbr = (i == 0) ? SNBR_HEADER : (i == n + 1) ? SNBR_TRAILER : 4'($urandom % 14);
        if (unframed && f == 3 && i == 0) x.snbr = 4'd2;
        @(negedge clk); dvld = 1; bus = x; berr = raise_err && f == 5 && i == 0;
        exp_w.push_back(x); exp_src.push_back((unframed && f >= 3) ? f - 1 : f);
        if (f == nfrag - 1 && i == n + 1 && !no_return) tk_back = 1;
      end
      @(negedge clk); dvld = 0; bus = '0; berr = 0; tk_back = 0;
    end
    if (nfrag == 0 && !no_return) begin @(negedge clk); tk_back = 1; @(negedge clk); tk_back = 0; end
  endtask

  task automatic event_run(input int nfrag, input bit e, input bit u, input bit nr, input logic [3:0] exp_err);
    automatic int n0 = n_end;
    @(negedge clk); ready = 1;
    serve(nfrag, e, u, nr);
    ready = 0;
    wait (n_end == n0 + 1);
    @(negedge clk);
    chk(last_err == exp_err, $sformatf("error flags %b exp %b", last_err, exp_err));
    chk(exp_w.size() == 0, "all words passed on");
    exp_w = {}; exp_src = {};
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // no token without READY or without room
    @(negedge clk); space_ok = 0; ready = 1;
    repeat (20) begin @(posedge clk); #1 chk(!tk_out && busy, "held while no room"); end
    @(negedge clk); space_ok = 1; ready = 0;
    repeat (20) begin @(posedge clk); #1 chk(!tk_out, "held while not ready"); end
    for (int i = 0; i < 5; i++) event_run(17, 0, 0, 0, 4'b0000);
    event_run(17, 1, 0, 0, 4'b0001);
    event_run(16, 0, 0, 0, 4'b0100);
    event_run(17, 0, 0, 1, 4'b0010);
    event_run(17, 0, 1, 0, 4'b1100);
    event_run(17, 0, 0, 0, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
