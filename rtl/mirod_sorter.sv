// mirod_sorter: first stage of the Level-2 branch of the read-out driver.
//
// Receives an event as a header item followed by its candidates and keeps
// the candidates of the triggering BC in a register list sorted by pT in
// descending order (insertion: each new candidate is placed behind all
// entries with equal or higher pT, so equal-pT candidates keep their
// arrival order). The list holds N_MAX entries; lower-pT candidates that do
// not fit fall off the end. When all candidates of the event are in, it
// sends the header, with ncand replaced by min(entries, l2_max), followed by
// that many candidates, highest pT first. Sorting descending in pT and the
// programmable limit come from the system description; the list size and
// the tie rule are this design's choices.
//
// Timing: one input candidate per cycle; output one item per cycle when
// out_ready; input is stalled while the result is sent.
module mirod_sorter
  import muctpi_pkg::*;
#(
  parameter int N_MAX = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic [$clog2(N_MAX):0] l2_max,
  input  logic     in_valid,
  output logic     in_ready,
  input  ev_item_t in_item,
  output logic     out_valid,
  input  logic     out_ready,
  output ev_item_t out_item
);
  localparam int CW = $clog2(N_MAX) + 1;
  typedef enum logic {COLLECT, EMIT} st_t;
  st_t st;
  rod_cand_t list [N_MAX];
  logic [CW-1:0] cnt, n_out, o_i;
  logic [11:0]   remaining;
  logic          have_hdr, emit_hdr;
  ev_hdr_t       hdr;
  int            pos;

  assign in_ready = (st == COLLECT);

  // insertion position of the incoming candidate
  always_comb begin
    pos = 0;
    for (int i = 0; i < N_MAX; i++)
      if (i < int'(cnt) && list[i].pt >= in_item.cand.pt) pos = i + 1;
  end

  assign n_out = (cnt < l2_max) ? cnt : l2_max;

  always_comb begin
    out_item = '0;
    out_valid = (st == EMIT);
    if (emit_hdr) begin
      out_item.is_hdr    = 1'b1;
      out_item.hdr       = hdr;
      out_item.hdr.ncand = 12'(n_out);
    end else
      out_item.cand = list[o_i[CW-2:0]];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= COLLECT; cnt <= '0; remaining <= '0; have_hdr <= 1'b0; emit_hdr <= 1'b0;
      hdr <= '0; o_i <= '0;
      for (int i = 0; i < N_MAX; i++) list[i] <= '0;
    end else begin
      case (st)
        COLLECT: if (in_valid) begin
          if (in_item.is_hdr) begin
            hdr       <= in_item.hdr;
            cnt       <= '0;
            remaining <= in_item.hdr.ncand;
            have_hdr  <= 1'b1;
            if (in_item.hdr.ncand == 0) begin
              st <= EMIT; emit_hdr <= 1'b1; o_i <= '0;
            end
          end else if (have_hdr) begin
            if (in_item.cand.in_trig && pos < N_MAX) begin
              for (int i = 0; i < N_MAX; i++)
                if (i == pos)     list[i] <= in_item.cand;
                else if (i > pos) list[i] <= list[i-1];
              if (cnt < CW'(N_MAX)) cnt <= cnt + 1'b1;
            end
            remaining <= remaining - 1'b1;
            if (remaining == 12'd1) begin
              st <= EMIT; emit_hdr <= 1'b1; o_i <= '0;
            end
          end
        end
        EMIT: if (out_ready) begin
          if (emit_hdr) emit_hdr <= 1'b0;
          else          o_i <= o_i + 1'b1;
          if ((emit_hdr && n_out == 0) || (!emit_hdr && o_i == n_out - 1'b1)) begin
            st <= COLLECT;
            have_hdr <= 1'b0;
          end
        end
        default: st <= COLLECT;
      endcase
    end
endmodule
