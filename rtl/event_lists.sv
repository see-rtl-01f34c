// event_lists - the dynamic event list (DEL) and the fire event list (FEL).
//
// DEL: every excited neuron (one that receives a spike or an input stimulus),
//      one 4-byte entry per neuron. Its 2 MB hold 2^19 entries, which sets the
//      neuron count of the whole engine.
// FEL: every neuron in the sending state together with the time at which it
//      returns to the receiving state: two 4-byte values per entry, so twice
//      the DEL's storage (4 MB, 2^19 entries).
// Both lists are unordered arrays with a fill count (this design's choice):
//   push      append at the end (refused while the list is full; the
//             overflow flag is then set and stays set until reset)
//   remove    by index: the last entry moves into the freed slot
//   read      DEL entry by index, combinational (sequencer walks the list)
//   scan      FEL only: one entry per clock, finds the earliest end time;
//             fel_min_t is all ones for an empty list. Takes count + 1 clocks.
// One DEL and one FEL operation per clock; a remove wins over a push to the
// same list in the same clock (push_ready is low then). In the board these
// arrays are external SRAMs; here they are memories of the given depth.
module event_lists
  import see_pkg::*;
#(
  parameter int unsigned DEL_AW = 19,
  parameter int unsigned FEL_AW = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  // DEL
  input  logic              del_push_valid,
  output logic              del_push_ready,
  input  nid_t              del_push_id,
  input  logic              del_rm_valid,
  input  logic [DEL_AW-1:0] del_rm_idx,
  input  logic [DEL_AW-1:0] del_rd_idx,
  output nid_t              del_rd_id,
  output logic [DEL_AW:0]   del_count,
  output logic              del_overflow,
  // FEL
  input  logic              fel_push_valid,
  output logic              fel_push_ready,
  input  nid_t              fel_push_id,
  input  time_t             fel_push_t,
  input  logic              fel_rm_valid,
  input  logic [FEL_AW-1:0] fel_rm_idx,
  input  logic              fel_scan_start,
  output logic              fel_scan_busy,
  output logic              fel_scan_done,
  output time_t             fel_min_t,
  output nid_t              fel_min_id,
  output logic [FEL_AW-1:0] fel_min_idx,
  output logic [FEL_AW:0]   fel_count,
  output logic              fel_overflow
);
  nid_t  del_mem [2**DEL_AW];
  nid_t  fel_id  [2**FEL_AW];
  time_t fel_t   [2**FEL_AW];

  // ------------------------------------------------------------------ DEL
  logic del_full;
  assign del_full       = (del_count == (DEL_AW+1)'(2**DEL_AW));
  assign del_push_ready = !del_rm_valid && !del_full;
  assign del_rd_id      = del_mem[del_rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      del_count    <= '0;
      del_overflow <= 1'b0;
    end else if (del_rm_valid && del_count != 0) begin
      del_count <= del_count - 1'b1;
    end else if (del_push_valid) begin
      if (del_full) del_overflow <= 1'b1;
      else          del_count    <= del_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (del_rm_valid && del_count != 0)
      del_mem[del_rm_idx] <= del_mem[DEL_AW'(del_count - 1'b1)];
    else if (del_push_valid && !del_full)
      del_mem[DEL_AW'(del_count)] <= del_push_id;
  end

  // ------------------------------------------------------------------ FEL
  logic fel_full;
  assign fel_full       = (fel_count == (FEL_AW+1)'(2**FEL_AW));
  assign fel_push_ready = !fel_rm_valid && !fel_full && !fel_scan_busy;

  logic [FEL_AW:0] scan_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fel_count     <= '0;
      fel_overflow  <= 1'b0;
      fel_scan_busy <= 1'b0;
      fel_scan_done <= 1'b0;
      scan_q        <= '0;
      fel_min_t     <= '1;
      fel_min_id    <= '0;
      fel_min_idx   <= '0;
    end else begin
      fel_scan_done <= 1'b0;
      if (fel_rm_valid && fel_count != 0) begin
        fel_count <= fel_count - 1'b1;
      end else if (fel_push_valid && !fel_scan_busy) begin
        if (fel_full) fel_overflow <= 1'b1;
        else          fel_count    <= fel_count + 1'b1;
      end
      if (fel_scan_start && !fel_scan_busy) begin
        fel_scan_busy <= 1'b1;
        scan_q        <= '0;
        fel_min_t     <= '1;
      end else if (fel_scan_busy) begin
        if (scan_q == fel_count) begin
          fel_scan_busy <= 1'b0;
          fel_scan_done <= 1'b1;
        end else begin
          if (fel_t[FEL_AW'(scan_q)] < fel_min_t) begin
            fel_min_t   <= fel_t[FEL_AW'(scan_q)];
            fel_min_id  <= fel_id[FEL_AW'(scan_q)];
            fel_min_idx <= FEL_AW'(scan_q);
          end
          scan_q <= scan_q + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fel_rm_valid && fel_count != 0) begin
      fel_id[fel_rm_idx] <= fel_id[FEL_AW'(fel_count - 1'b1)];
      fel_t[fel_rm_idx]  <= fel_t[FEL_AW'(fel_count - 1'b1)];
    end else if (fel_push_valid && !fel_full && !fel_scan_busy) begin
      fel_id[FEL_AW'(fel_count)] <= fel_push_id;
      fel_t[FEL_AW'(fel_count)]  <= fel_push_t;
    end
  end

  // the sequencer must not remove FEL entries while a scan is running
  assert property (@(posedge clk) disable iff (!rst_n) fel_scan_busy |-> !fel_rm_valid)
    else $error("FEL entry removed during a scan");

endmodule
