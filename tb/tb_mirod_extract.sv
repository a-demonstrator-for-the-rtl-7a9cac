// tb_mirod_extract: sends whole events (a CTP-interface fragment and 16
// octant fragments with random sector words) as the token master would and
// reads the header and candidate FIFOs. Event number, BC number,
// multiplicity, monitoring flag, error flags and the candidate list are
// compared with values derived from the words sent: only non-empty
// candidates at or above the threshold of their position, sector mapped
// through a reprogrammed entry, in_trig set for the triggering BC.
//
// Per-position thresholds and the sector map follow the document; the
// record layouts are this design's. No ports; ends with a TB_RESULT line
// and has a watchdog.
module tb_mirod_extract;
  import muctpi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic w_valid = 0, ev_end = 0, space_ok, map_we = 0, hdr_rd, hdr_empty, cand_rd, cand_empty;
  bus_word_t w = '0;
  logic [4:0] w_src = '0;
  logic [3:0] ev_err = '0;
  logic [2:0] thr0 = 3'd0, thr1 = 3'd0;
  logic [7:0] map_addr = '0, map_wdata = '0, map_rdata;
  ev_hdr_t hdr_rdata;
  rod_cand_t cand_rdata;
  int checks = 0, failures = 0, n_thr_cut = 0, n_trig = 0, n_other = 0;
  ev_hdr_t exp_h [$];
  rod_cand_t exp_c [$];

  mirod_extract dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  assign hdr_rd  = !hdr_empty;
  assign cand_rd = !cand_empty;
  always @(posedge clk) if (rst_n) begin
    if (hdr_rd) begin
      chk(exp_h.size() > 0 && hdr_rdata == exp_h[0], $sformatf("header %h exp %h", hdr_rdata, exp_h[0]));
      if (exp_h.size() > 0) void'(exp_h.pop_front());
    end
    if (cand_rd) begin
      chk(exp_c.size() > 0 && cand_rdata == exp_c[0], $sformatf("candidate %h exp %h", cand_rdata, exp_c[0]));
      if (exp_c.size() > 0) void'(exp_c.pop_front());
    end
  end

  task automatic send(input bus_word_t x, input int src);
    @(negedge clk); w_valid = 1; w = x; w_src = 5'(src);
    @(negedge clk); w_valid = 0;
  endtask

  task automatic send_event(input int ev, input bit trl_err, input logic [3:0] tm_err);
    automatic ev_hdr_t h = '0;
    automatic logic [11:0] bc = 12'($urandom % 3564);
    automatic mult_t m = mult_t'($urandom);
    h.evid = 19'(ev); h.bcid = bc; h.mult = m; h.mon = 1'($urandom); h.err = tm_err | {3'b0, trl_err};
    send('{snbr: SNBR_HEADER, data: {h.mon, bc, 19'(ev)}}, 0);
    send('{snbr: 4'h0, data: {2'b00, bc, m}}, 0);
    send('{snbr: SNBR_TRAILER, data: 32'd1}, 0);
    for (int o = 1; o <= N_MIOCT; o++) begin
      send('{snbr: SNBR_HEADER, data: {1'b0, bc, 19'(ev)}}, o);
      for (int b = -1; b <= 1; b++)
        for (int s = 0; s < N_SECTOR; s++) if ($urandom % 5 == 0) begin
          automatic sector_word_t x = sector_word_t'($urandom);
          x.bcid = 3'(int'(bc) + b);
          send('{snbr: 4'(s), data: x}, o);
          for (int j = 0; j < 2; j++) begin
            automatic cand_t c = j ? x.c1 : x.c0;
            automatic rod_cand_t r;
            if (c.pt != 0 && c.pt >= (j ? thr1 : thr0)) begin
              r.sector_id = ((o - 1) * 14 + s == 20) ? 8'hA7 : 8'({4'(o - 1), 4'(s)});
              r.pt = c.pt; r.roi = c.roi; r.ovl = c.ovl; r.cidx = 1'(j);
              r.in_trig = (b == 0); r.bc = x.bcid;
              if (b == 0) n_trig++; else n_other++;
              exp_c.push_back(r); h.ncand++;
            end else if (c.pt != 0) n_thr_cut++;
          end
        end
      send('{snbr: SNBR_TRAILER, data: {(trl_err && o == 7) ? 4'h1 : 4'h0, 28'd5}}, o);
    end
    exp_h.push_back(h);
    @(negedge clk); ev_end = 1; ev_err = tm_err;
    @(negedge clk); ev_end = 0; ev_err = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); map_we = 1; map_addr = 8'd20; map_wdata = 8'hA7;
    @(negedge clk); map_we = 0; map_addr = 8'd21;
    #1 chk(map_rdata == 8'h17, "default map entry {octant 1, sector 7}");
    chk(space_ok, "room for an event");
    for (int ev = 0; ev < 12; ev++) begin
      thr0 = 3'(ev % 4); thr1 = 3'((ev / 2) % 5);
      send_event(ev, ev == 4, (ev == 7) ? 4'b0100 : 4'b0000);
    end
    repeat (3000) @(posedge clk);
    chk(exp_h.size() == 0 && exp_c.size() == 0, "all headers and candidates out");
    chk(n_thr_cut > 0 && n_trig > 0 && n_other > 0, "thresholds and BC tagging exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
