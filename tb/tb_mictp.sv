// tb_mictp: CTP interface module. The multiplicity from the backplane must
// reach the CTP one edge later, the fast signals must reach the backplane
// one edge later, BUSY must be passed on. For each L1A the fragment read
// with the token must carry the event number and the BC number and
// multiplicity of the BC `latency` BCs before the L1A; a monitoring flag
// given with the L1A must appear in the header.
//
// Latching towards the CTP and the pipeline for read-out follow the
// description; latencies, register addresses and fragment layout are this
// design's. No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mictp;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ctp_bcr = 0, ctp_ecr = 0, ctp_l1a = 0, ctp_mon = 0, ctp_test = 0, bak_busy = 0, tk_in = 0;
  mult_t ctp_mult, bak_mult = '0;
  logic ctp_busy, bak_bcr, bak_ecr, bak_l1a, bak_mon, bak_test, busy, tk_out, ready, dvld, berr;
  bus_word_t bus;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  int checks = 0, failures = 0, C = 0, R = -1000;
  mult_t m_hist [int];
  logic [5:0] f_hist [int];
  localparam int LAT = 37;

  mictp dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    m_hist[C] = bak_mult;
    f_hist[C] = {ctp_test, bak_busy, ctp_mon, ctp_l1a, ctp_ecr, ctp_bcr};
    if (bak_bcr) R = C;
    C <= C + 1;
    #2 bak_mult = mult_t'({$urandom, $urandom});
    ctp_test = ($urandom % 4 == 0);
  end
  always @(negedge clk) if (rst_n && C > 2) begin
    chk(ctp_mult == m_hist[C - 1], "multiplicity to CTP one edge later");
    chk({bak_test, ctp_busy, bak_mon, bak_l1a, bak_ecr, bak_bcr} == f_hist[C - 1], "fast signals and BUSY one edge later");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_word_t got [$];
    int c0, t, trig;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); cfg_we = 1; cfg_addr = 16'h0000; cfg_wdata = LAT;
    @(negedge clk); cfg_we = 0;
    @(negedge clk); ctp_bcr = 1; ctp_ecr = 1;
    @(negedge clk); ctp_bcr = 0; ctp_ecr = 0;
    repeat (100) @(posedge clk);
    for (int ev = 0; ev < 20; ev++) begin
      automatic bit mon = (ev % 3 == 1);
      @(negedge clk); ctp_l1a = 1; ctp_mon = mon; bak_busy = (ev % 2); c0 = C;
      @(negedge clk); ctp_l1a = 0; ctp_mon = 0;
      trig = c0 - LAT;
      wait (ready);
      @(negedge clk); tk_in = 1;
      got = {}; t = 0;
      forever begin
        @(posedge clk); #1; tk_in = 0; t++;
        if (dvld) got.push_back(bus);
        if (tk_out || t > 50) break;
      end
      chk(!berr && got.size() == 3, "three-word fragment");
      if (got.size() == 3) begin
        automatic logic [11:0] bc = 12'(trig - R - 1);
        chk(got[0] == '{snbr: SNBR_HEADER, data: {mon, bc, 19'(ev)}},
            $sformatf("header %h exp bc %0d ev %0d", got[0].data, bc, ev));
        chk(got[1] == '{snbr: 4'h0, data: {2'b00, bc, m_hist[trig]}}, "multiplicity word");
        chk(got[2].snbr == SNBR_TRAILER && got[2].data[11:0] == 12'd1, "trailer");
      end
      repeat ($urandom % 50) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
