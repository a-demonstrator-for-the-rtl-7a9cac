// tb_mioct_sector_input: drives one sector input with random words that
// change after each clock edge, so that the rising and the falling edge see
// different words. For each of several delays and both edge selections it
// checks that out carries the word sampled 1 + delay edges earlier, then
// plays back a loaded test memory. Expected values come from a record of
// what was on the input at each edge.
//
// Edge choice, delays and test memory are the document's features; the
// 1 + delay latency is this design's. No ports; ends with a TB_RESULT line
// and has a watchdog.
module tb_mioct_sector_input;
  import muctpi_pkg::*;
  localparam int MAXD = 16, TMD = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] sector_in = '0, tm_wdata = '0, out;
  logic edge_sel = 1'b0, test_en = 1'b0, tm_we = 1'b0;
  logic [3:0] delay = '0;
  logic [7:0] tm_waddr = '0, tm_raddr = '0;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] posv [int];
  logic [31:0] negv [int];
  logic [7:0]  rav  [int];
  logic [31:0] tm_ref [TMD];

  mioct_sector_input #(.MAX_DELAY(MAXD), .TM_DEPTH(TMD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; posv[cyc + 1] = sector_in; rav[cyc + 1] = tm_raddr; end
  always @(negedge clk) negv[cyc + 1] = sector_in;
  always @(posedge clk) begin #2 sector_in = $urandom; tm_raddr = tm_raddr + 1; end
  always @(negedge clk) begin #2 sector_in = $urandom; end

  task automatic check_phase(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] exp;
      @(posedge clk); #1;
      if (test_en)       exp = tm_ref[rav[cyc - 1 - int'(delay)]];
      else if (edge_sel) exp = negv[cyc - 1 - int'(delay)];
      else               exp = posv[cyc - 1 - int'(delay)];
      checks++;
      if (out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d edge %0d delay %0d test %0d: out %h exp %h",
                                    cyc, edge_sel, delay, test_en, out, exp);
      end
    end
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
    // load test memory
    for (int a = 0; a < TMD; a++) begin
      @(negedge clk);
      tm_we = 1'b1; tm_waddr = 8'(a); tm_wdata = $urandom; tm_ref[a] = tm_wdata;
    end
    @(negedge clk) tm_we = 1'b0;
    for (int e = 0; e < 2; e++)
      foreach (dl_list[i]) begin
        @(negedge clk); edge_sel = e[0]; delay = 4'(dl_list[i]);
        repeat (MAXD + 2) @(posedge clk);
        check_phase(40);
      end
    @(negedge clk); test_en = 1'b1; delay = 4'd3;
    repeat (MAXD + 2) @(posedge clk);
    check_phase(300);
    @(negedge clk); delay = 4'd0;
    repeat (MAXD + 2) @(posedge clk);
    check_phase(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int dl_list [6] = '{0, 1, 2, 5, 10, 15};
endmodule
