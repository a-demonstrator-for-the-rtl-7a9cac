// tb_mirod_playback: loads random entries into a (reduced, 64-entry)
// play-back memory and replays sequences of several lengths, including the
// full memory and an empty one. The outputs must show entry k exactly
// 1 + k edges after the start edge, nothing before or after, and active
// must cover the replay.
//
// A play-back memory for the MIBAK data and control follows the document;
// the entry layout and the start control are this design's. No ports; ends
// with a TB_RESULT line and has a watchdog.
module tb_mirod_playback;
  import muctpi_pkg::*;
  localparam int D = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 0, start = 0;
  logic [5:0] waddr = '0;
  logic [39:0] wdata = '0;
  logic [6:0] length = '0;
  logic active, ready, dvld, berr, tk_back;
  bus_word_t bus;
  logic [39:0] img [D];
  int checks = 0, failures = 0;

  mirod_playback #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic replay(input int len);
    @(negedge clk); length = 7'(len); start = 1;   // start sampled at edge n
    @(negedge clk); start = 0;                     // after edge n
    chk(active == (len != 0), $sformatf("active after start (len %0d)", len));
    for (int k = 0; k < len; k++) begin
      @(negedge clk);                              // after edge n + 1 + k
      chk({berr, tk_back, dvld, ready, bus} == img[k], $sformatf("entry %0d of %0d: %h exp %h", k, len, {berr, tk_back, dvld, ready, bus}, img[k]));
      chk(active, "active during replay");
    end
    repeat (3) begin
      @(negedge clk);
      chk({berr, tk_back, dvld, ready, bus} == '0, $sformatf("outputs idle after replay of %0d", len));
    end
    chk(!active, "active ends");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      img[a] = {$urandom, $urandom};
      @(negedge clk); we = 1; waddr = 6'(a); wdata = img[a];
    end
    @(negedge clk); we = 0;
    repeat (4) begin
      @(negedge clk);
      chk({berr, tk_back, dvld, ready, bus} == '0 && !active, "idle before start");
    end
    replay(5);
    replay(1);
    replay(D);
    replay(0);
    replay(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
