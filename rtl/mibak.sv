// mibak: logic of the backplane that joins the octant modules, the CTP
// interface module and the read-out driver.
//
// Multiplicity summation: the six 3-bit multiplicities of all N_MIOCT
// octant modules are added per threshold, each sum saturating at 7, and
// registered once (the system description places this summation on the
// backplane; its pipelining is this design's choice).
//
// Transfer bus: N_SLV = 1 + N_MIOCT token slaves (slave 0 is the CTP
// interface module, slaves 1..N_MIOCT the octant modules) share one bus.
// Only the token holder drives non-zero values, so data, valid and ERROR
// are the OR of all drivers; READY is the AND of all slaves' ready; BUSY is
// the OR of every module's busy. The token runs as a daisy chain from the
// read-out driver through slave 0, 1, ... N_SLV-1 and back (order of the
// chain is this design's choice).
//
// The fast signals (BC clock, BCR, L1A, ECR, monitoring signal) are
// broadcast by plain wiring in the top level.
module mibak
  import muctpi_pkg::*;
#(
  parameter int N_OCT   = N_MIOCT,
  parameter int N_SLV   = N_MIOCT + 1,
  parameter int N_BUSY  = N_MIOCT + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mult_t             oct_mult [N_OCT],
  output mult_t             total_mult,
  // transfer bus
  input  logic              tk_from_rod,
  output logic              tk_to_rod,
  input  logic [N_SLV-1:0] slv_tk_out,
  output logic [N_SLV-1:0] slv_tk_in,
  input  logic [N_SLV-1:0] slv_ready,
  input  logic [N_SLV-1:0] slv_dvld,
  input  bus_word_t         slv_bus [N_SLV],
  input  logic [N_SLV-1:0] slv_berr,
  output logic              ready,
  output logic              dvld,
  output bus_word_t         bus,
  output logic              berr,
  input  logic [N_BUSY-1:0] busy_in,
  output logic              busy
);
  mult_t sum_d;

  always_comb begin
    sum_d = '0;
    for (int i = 0; i < N_OCT; i++) sum_d = mult_add_sat(sum_d, oct_mult[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) total_mult <= '0;
    else        total_mult <= sum_d;

  always_comb begin
    bus = '0;
    for (int i = 0; i < N_SLV; i++) bus = bus | slv_bus[i];
  end

  assign dvld  = |slv_dvld;
  assign berr  = |slv_berr;
  assign ready = &slv_ready;
  assign busy  = |busy_in;
  assign slv_tk_in = {slv_tk_out[N_SLV-2:0], tk_from_rod};
  assign tk_to_rod = slv_tk_out[N_SLV-1];
endmodule
