// tb_mibak_token_slave: fills a read-out FIFO with framed fragments and
// passes the token. Checks READY, that each fragment appears word for word
// on the bus with valid, the first word two edges after the token, the
// token leaving with the trailer, and the ERROR line for a token without
// data, a fragment without header and a fragment without trailer.
//
// The order READY, token, data, token back and the ERROR cases follow the
// description of the transfer; the two-edge latency is this design's.
// No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mibak_token_slave;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frag_done = 1'b0, fifo_empty, fifo_rd, tk_in = 1'b0, tk_out, ready, dvld, berr;
  logic wr = 1'b0, full;
  bus_word_t wdata = '0, fifo_rdata, bus;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int n_err = 0;

  sync_fifo #(.WIDTH(36), .DEPTH(16)) u_f (.clk, .rst_n, .wr, .wdata, .rd(fifo_rd), .rdata(fifo_rdata),
                                            .empty(fifo_empty), .full, .count);
  mibak_token_slave dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic push(input bus_word_t w);
    @(negedge clk); wr = 1'b1; wdata = w;
    @(negedge clk); wr = 1'b0;
  endtask

  // send a token and collect what comes back
  task automatic pass_token(output bus_word_t got [$], output bit err_seen, output int first_lat);
    int t = 0;
    got = {}; err_seen = 0; first_lat = -1;
    @(negedge clk); tk_in = 1'b1;
    forever begin
      @(posedge clk); #1; t++;
      tk_in = 1'b0;
      if (berr) err_seen = 1;
      if (dvld) begin got.push_back(bus); if (first_lat < 0) first_lat = t; end
      else chk(bus == '0, "bus idle zero");
      if (tk_out) break;
      if (t > 100) begin chk(0, "token lost"); break; end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_word_t frag [$], got [$];
    bit e; int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    chk(!ready, "not ready when empty");
    for (int f = 0; f < 4; f++) begin
      int n = $urandom % 6;
      frag = {};
      frag.push_back('{snbr: SNBR_HEADER, data: $urandom});
      for (int i = 0; i < n; i++) frag.push_back('{snbr: 4'($urandom % 14), data: $urandom});
      frag.push_back('{snbr: SNBR_TRAILER, data: 32'(n)});
      foreach (frag[i]) push(frag[i]);
      @(negedge clk); frag_done = 1'b1;
      @(negedge clk); frag_done = 1'b0;
      chk(ready, "ready after fragment");
      pass_token(got, e, lat);
      chk(!e, "no error on good fragment");
      chk(lat == 2, $sformatf("first word latency %0d", lat));
      chk(got.size() == frag.size(), "fragment length");
      foreach (frag[i]) if (i < got.size()) chk(got[i] == frag[i], "fragment word");
      @(posedge clk); #1;
      chk(!ready, "not ready after send");
    end
    // token without data
    pass_token(got, e, lat);
    chk(e && got.size() == 0, "error: token without data"); n_err++;
    // fragment without header
    push('{snbr: 4'd3, data: 32'h1234});
    push('{snbr: SNBR_TRAILER, data: 32'd1});
    @(negedge clk); frag_done = 1'b1;
    @(negedge clk); frag_done = 1'b0;
    pass_token(got, e, lat);
    chk(e && got.size() == 2, "error: no header"); n_err++;
    // fragment without trailer
    push('{snbr: SNBR_HEADER, data: 32'h55});
    push('{snbr: 4'd1, data: 32'h66});
    @(negedge clk); frag_done = 1'b1;
    @(negedge clk); frag_done = 1'b0;
    pass_token(got, e, lat);
    chk(e && got.size() == 2, "error: no trailer"); n_err++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
