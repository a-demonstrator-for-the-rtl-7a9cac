// tb_mibak: backplane logic. Random multiplicities of the 16 octant modules
// must sum per threshold with saturation at 7, one edge later. The bus,
// valid and ERROR lines must be the OR of the drivers, READY the AND, BUSY
// the OR, and the token must run from the read-out driver through slave 0,
// 1, ... and back.
//
// Saturation at 7 and the wired-AND READY / wired-OR BUSY come from the
// system description; the one-edge registering and the chain order are this
// design's. No ports; ends with a TB_RESULT line and has a watchdog.
module tb_mibak;
  import muctpi_pkg::*;
  localparam int NS = N_MIOCT + 1, NB = N_MIOCT + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  mult_t oct_mult [N_MIOCT];
  mult_t total_mult;
  logic tk_from_rod = 1'b0, tk_to_rod;
  logic [NS-1:0] slv_tk_out = '0, slv_tk_in, slv_ready = '0, slv_dvld = '0, slv_berr = '0;
  bus_word_t slv_bus [NS];
  logic ready, dvld, berr, busy;
  bus_word_t bus;
  logic [NB-1:0] busy_in = '0;
  int checks = 0, failures = 0, n_sat = 0;

  mibak dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (slv_bus[i]) slv_bus[i] = '0;
    foreach (oct_mult[i]) oct_mult[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      mult_t e;
      int sum;
      @(negedge clk);
      foreach (oct_mult[i])
        for (int k = 0; k < N_THR; k++)
          oct_mult[i][k] = ($urandom % 4 == 0) ? 3'($urandom % ((n % 2) ? 8 : 2)) : 3'd0;
      for (int k = 0; k < N_THR; k++) begin
        sum = 0;
        foreach (oct_mult[i]) sum += int'(oct_mult[i][k]);
        if (sum > 7) n_sat++;
        e[k] = 3'((sum > 7) ? 7 : sum);
      end
      @(posedge clk); #1;
      chk(total_mult == e, $sformatf("sum %h exp %h", total_mult, e));
    end
    // bus lines
    for (int n = 0; n < 200; n++) begin
      int who = $urandom % NS;
      bus_word_t w = '{snbr: 4'($urandom), data: $urandom};
      @(negedge clk);
      foreach (slv_bus[i]) slv_bus[i] = '0;
      slv_bus[who] = w; slv_dvld = NS'(1) << who; slv_berr = ($urandom % 2) ? NS'(1) << who : '0;
      slv_ready = (n % 3 == 0) ? '1 : ~(NS'(1) << who);
      busy_in = (n % 5 == 0) ? NB'(1) << (n % NB) : '0;
      #1;
      chk(bus == w && dvld && berr == slv_berr[who], "bus OR");
      chk(ready == (n % 3 == 0), "READY is AND");
      chk(busy == (n % 5 == 0), "BUSY is OR");
    end
    // token chain
    tk_from_rod = 1'b1; #1; chk(slv_tk_in == NS'(1), "token to slave 0");
    tk_from_rod = 1'b0;
    for (int i = 0; i < NS - 1; i++) begin
      slv_tk_out = NS'(1) << i; #1;
      chk(slv_tk_in == NS'(1) << (i + 1) && !tk_to_rod, "token chain");
    end
    slv_tk_out = NS'(1) << (NS - 1); #1;
    chk(tk_to_rod && slv_tk_in == '0, "token back to read-out driver");
    chk(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
