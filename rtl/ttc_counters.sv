// ttc_counters: bunch-crossing identifier and event counter kept by every
// module. The BCID counts bunch crossings, wraps after BC_PER_ORBIT and is
// cleared by the bunch counter reset (BCR); the event number counts Level-1
// Accepts and is cleared by the event counter reset (ECR). Outputs are the
// values that belong to the current clock cycle; evid is the number that the
// next L1A receives (the first event after ECR is number 0).
module ttc_counters
  import muctpi_pkg::*;
#(
  parameter int ORBIT = BC_PER_ORBIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bcr,
  input  logic              ecr,
  input  logic              l1a,
  output logic [BCID_W-1:0] bcid,
  output logic [EVID_W-1:0] evid
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bcid <= '0;
      evid <= '0;
    end else begin
      if (bcr)                           bcid <= '0;
      else if (bcid == BCID_W'(ORBIT-1)) bcid <= '0;
      else                               bcid <= bcid + 1'b1;
      if (ecr)      evid <= '0;
      else if (l1a) evid <= evid + 1'b1;
    end
endmodule
