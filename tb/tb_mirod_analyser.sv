// tb_mirod_analyser: drives random backplane and S-Link activity, with
// long idle stretches, into the analyser for each of its three sources.
// A record kept at every clock edge of what was on the selected source
// gives the expected FIFO content: one entry per active cycle with its time
// stamp, capture stopping when the (reduced, 64-entry) FIFO is full, and a
// new enable emptying it and restarting the stamp.
//
// Storing MIBAK and S-Link signals for read-back follows the document; the
// entry layout, activity filter and time stamp are this design's. No
// ports; ends with a TB_RESULT line and has a watchdog.
module tb_mirod_analyser;
  import muctpi_pkg::*;
  localparam int D = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 0, rd = 0;
  logic [1:0] src = 0;
  logic bak_ready = 0, bak_tk_out = 0, bak_tk_back = 0, bak_dvld = 0, bak_berr = 0;
  bus_word_t bak_bus = '0;
  logic [31:0] l2_ud = 0, daq_ud = 0;
  logic l2_uctrl = 0, l2_uwen = 0, l2_lff = 0, daq_uctrl = 0, daq_uwen = 0, daq_lff = 0;
  logic [59:0] rdata;
  logic empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, C = 0, t_en = 0;
  logic [59:0] exp_q [$];
  bit armed = 0;
  int n_full = 0;

  mirod_analyser #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // expected entries: sampled at each edge from what the source shows
  always @(posedge clk) begin
    automatic logic [7:0] c;
    automatic logic [35:0] d;
    case (src)
      2'd0: begin c = {3'b0, bak_berr, bak_dvld, bak_tk_back, bak_tk_out, bak_ready}; d = bak_bus; end
      2'd1: begin c = {5'b0, l2_lff, l2_uwen, l2_uctrl}; d = {4'b0, l2_ud}; end
      default: begin c = {5'b0, daq_lff, daq_uwen, daq_uctrl}; d = {4'b0, daq_ud}; end
    endcase
    if (armed && C > t_en && c != 0 && exp_q.size() < D) exp_q.push_back({16'(C - t_en - 1), c, d});
    C <= C + 1;
  end

  // random activity, idle two thirds of the time
  always @(posedge clk) begin
    #2;
    if ($urandom % 3 == 0) begin
      {bak_ready, bak_tk_out, bak_tk_back, bak_dvld, bak_berr} = 5'($urandom);
      {l2_uctrl, l2_uwen, l2_lff, daq_uctrl, daq_uwen, daq_lff} = 6'($urandom);
    end else begin
      {bak_ready, bak_tk_out, bak_tk_back, bak_dvld, bak_berr} = '0;
      {l2_uctrl, l2_uwen, l2_lff, daq_uctrl, daq_uwen, daq_lff} = '0;
    end
    bak_bus = bus_word_t'({$urandom, $urandom});
    l2_ud = $urandom; daq_ud = $urandom;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run capture for n cycles, then read everything back and compare
  task automatic capture(input logic [1:0] s, input int n);
    int got = 0;
    @(negedge clk); src = s; enable = 1; t_en = C; armed = 1;   // enabling edge is C
    exp_q = {};
    repeat (n) @(negedge clk);
    enable = 0; armed = 0;
    @(negedge clk);
    if (count == D) n_full++;
    chk(int'(count) == exp_q.size(), $sformatf("source %0d: %0d entries, expected %0d", s, count, exp_q.size()));
    while (!empty) begin
      automatic logic [59:0] e = exp_q.size() ? exp_q.pop_front() : '1;
      chk(rdata == e, $sformatf("source %0d entry %0d: %h exp %h", s, got, rdata, e));
      rd = 1; @(negedge clk); rd = 0;
      got++;
    end
    chk(exp_q.size() == 0, "no entries missing");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int r = 0; r < 6; r++) begin
      capture(2'(r % 3), (r == 5) ? 600 : 40 + 30 * r);
      repeat (7) @(negedge clk);
    end
    chk(n_full > 0, "a capture filled the FIFO and stopped");
    // nothing is stored while disabled
    repeat (50) @(negedge clk);
    chk(empty && count == 0, "nothing stored while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
