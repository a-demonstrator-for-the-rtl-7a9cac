// tb_mioct: octant module end to end. Sectors arrive with different cable
// latencies (0..3 BCs) and are aligned by programmed delays; half of them
// are sampled on the falling edge while the rising edge sees garbage. The
// multiplicity must equal a saturating count of the candidates of each BC,
// appearing exactly 2 + delay edges after sampling. A wrong delay must give
// BCID errors and zero multiplicity. Test-memory play-back must replace
// the input, starting with the test signal. Fragments read with the token must hold the words of the
// triggering BC, and the monitoring FIFO must hold a copy readable through
// the register bus.
//
// Edge selection, delays, BCID check, test memories and the monitoring FIFO
// are the document's features; timings and register addresses are this
// design's. No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mioct;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SECTOR-1:0][SECT_W-1:0] sector_in = '0;
  logic bcr = 1'b0, ecr = 1'b0, l1a = 1'b0, mon_sig = 1'b0, test_sig = 1'b0, tk_in = 1'b0;
  mult_t mult;
  logic tk_out, ready, dvld, berr, busy;
  bus_word_t bus;
  logic cfg_we = 1'b0, cfg_re = 1'b0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  int checks = 0, failures = 0;
  int B = 0;                                   // BC number of the current cycle
  int C = 0;                                   // clock edges since start
  logic [SECT_W-1:0] words [int][N_SECTOR];    // words of each BC
  mult_t exp_mult [int];
  bit run_check = 0, stim = 1;
  int n_checked = 0, n_nonzero = 0;

  mioct dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) C <= C + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 1'b0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d, input bit pop = 0);
    @(negedge clk); cfg_addr = a; #1 d = cfg_rdata; cfg_re = pop;
    @(negedge clk); cfg_re = 1'b0;
  endtask

  function automatic logic [2:0] lat(input int s); return 3'(s % 4); endfunction

  // make the words of BC b and its expected multiplicity
  function automatic void make_bc(input int b);
    int cnt [7] = '{default: 0};
    for (int s = 0; s < N_SECTOR; s++) begin
      sector_word_t w = '0;
      w.bcid = 3'(b);
      if ($urandom % 3 == 0) w.c0.pt = 3'(1 + $urandom % 6);
      if ($urandom % 6 == 0) w.c1.pt = 3'(1 + $urandom % 6);
      w.c0.roi = 8'($urandom);
      words[b][s] = w;
      for (int t = 1; t <= 6; t++) cnt[t] += int'(w.c0.pt >= 3'(t)) + int'(w.c1.pt >= 3'(t));
    end
    for (int t = 1; t <= 6; t++) exp_mult[b][t-1] = 3'((cnt[t] > 7) ? 7 : cnt[t]);
  endfunction

  // BC counter of the bench, follows the module's (both cleared by bcr)
  always @(posedge clk) B <= bcr ? 0 : B + 1;

  // drive sector s with the word of BC (B - lat); falling-edge sectors get
  // garbage after the falling edge
  always @(posedge clk) begin
    #2;
    if (!words.exists(B + 1)) make_bc(B + 1);
    for (int s = 0; s < N_SECTOR; s++)
      sector_in[s] = (stim && words.exists(B - int'(lat(s)))) ? words[B - int'(lat(s))][s] : '0;
  end
  always @(negedge clk) begin
    #2;
    for (int s = 1; s < N_SECTOR; s += 2) sector_in[s] = $urandom;
  end

  // multiplicity check: BC b visible in cycle b + 6
  always @(negedge clk) if (run_check && exp_mult.exists(B - 6)) begin
    chk(mult == exp_mult[B - 6], $sformatf("mult BC %0d: %h exp %h", B - 6, mult, exp_mult[B - 6]));
    n_checked++;
    if (mult != 0) n_nonzero++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bus_word_t got [$];
    int t, trig;
    logic [31:0] e0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(16'h0001, 32'h2AAA);                     // odd sectors on falling edge
    for (int s = 0; s < N_SECTOR; s++) wr(16'h0010 + 16'(s), 32'(3 - lat(s)));
    wr(16'h0003, 32'd5);
    wr(16'h0000, 32'h0014_001D);               // latency 20, zs, checks, overlap
    rd(16'h0000, d); chk(d == 32'h0014_001D, "register read back");
    @(negedge clk); bcr = 1'b1;
    @(negedge clk); bcr = 1'b0;
    repeat (30) @(posedge clk);
    run_check = 1;
    repeat (400) @(posedge clk);
    run_check = 0;
    chk(n_checked > 350 && n_nonzero > 300, "multiplicities checked");
    rd(16'h0007, d); e0 = d;
    repeat (50) @(posedge clk);
    rd(16'h0007, d); chk(d == e0, "no BCID errors when aligned");
    // wrong delay on sector 5 -> BCID errors, multiplicity zero
    wr(16'h0015, 32'd0);
    repeat (20) @(posedge clk);
    rd(16'h0007, d); chk(d > e0 + 10, $sformatf("BCID errors counted: %0d", d - e0));
    chk(mult == 0, "zero multiplicity on BCID error");
    wr(16'h0015, 32'(3 - lat(5)));
    // L1A and token read-out
    repeat (30) @(posedge clk);
    @(negedge clk); l1a = 1'b1; trig = B - 6 - 20;
    @(negedge clk); l1a = 1'b0;
    wait (ready);
    @(negedge clk); tk_in = 1'b1;
    t = 0;
    forever begin
      @(posedge clk); #1; tk_in = 1'b0; t++;
      if (dvld) got.push_back(bus);
      if (tk_out || t > 100) break;
    end
    chk(!berr, "no bus error");
    chk(got.size() >= 2 && got[0].snbr == SNBR_HEADER && got[0].data[30:19] == 12'(trig),
        $sformatf("header BCID %0d exp %0d", got[0].data[30:19], trig));
    begin
      automatic int k = 1;
      for (int s = 0; s < N_SECTOR; s++) begin
        automatic sector_word_t w = words[trig][s];
        if (w.c0.pt != 0 || w.c1.pt != 0) begin
          chk(k < got.size() && got[k] == '{snbr: 4'(s), data: words[trig][s]}, $sformatf("sector %0d word", s));
          k++;
        end
      end
      chk(k == got.size() - 1 && got[k].snbr == SNBR_TRAILER, "trailer after sector words");
    end
    // monitoring FIFO (not enabled) must be empty; enable and trigger again
    rd(16'h0006, d); chk(d[4] == 1'b1, "monitoring FIFO empty when disabled");
    wr(16'h0000, 32'h0014_001F);
    @(negedge clk); l1a = 1'b1; mon_sig = 1'b1;
    @(negedge clk); l1a = 1'b0; mon_sig = 1'b0;
    repeat (40) @(posedge clk);
    rd(16'h0005, d); chk(d[31] == 1'b1 && d[18:0] == 19'd1, "monitoring copy: header of event 1 with flag");
    rd(16'h0006, d, 1); chk(d[3:0] == SNBR_HEADER && d[4] == 1'b0, "monitoring status");
    // test memory on sector 0: word 5 holds a pT-6 candidate. A test signal
    // sampled at edge T restarts play-back, word k is read for edge T+k+1,
    // so with delay 3 the count shows after edge T + 5 + 3 + 3, and again
    // 256 BCs later when the play-back wraps.
    wr(16'h0000, 32'h0014_0019);               // BCID check off
    stim = 0;
    for (int a = 0; a < 256; a++) wr(16'h8000 | 16'(a), (a == 5) ? 32'h0000_C000 : 32'h0);
    wr(16'h0002, 32'h1);
    for (int rep = 0; rep < 2; rep++) begin
      automatic int t0, hits = 0, first = -1;
      repeat (5 + rep * 37) @(posedge clk);
      @(negedge clk); test_sig = 1'b1; t0 = C + 1;
      @(negedge clk); test_sig = 1'b0;
      while (C < t0 + 256 + 20) begin
        @(negedge clk);
        if (mult != 0) begin
          hits++;
          if (first < 0) first = C - t0;
          chk(mult[5] == 3'd1 && mult[0] == 3'd1, "test memory candidate counted once");
        end
      end
      chk(first == 11, $sformatf("test memory play-back starts with the test signal (%0d)", first));
      chk(hits == 2, $sformatf("test memory play-back wraps after 256 BCs (%0d)", hits));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
