// tb_event_lists - DEL and FEL with 16 entries each against queue models.
// 600 random clocks of pushes, removals by index and reads; FEL scans are
// started now and then and must return the earliest end time, its neuron and
// index after exactly count + 1 clocks. Pushing into a full list must be
// refused and raise the overflow flag (this is driven on purpose).
module tb_event_lists;
  import see_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int AW = 4, CAP = 16;
  logic del_push_valid, del_push_ready, del_rm_valid, del_overflow;
  nid_t del_push_id, del_rd_id;
  logic [AW-1:0] del_rm_idx, del_rd_idx;
  logic [AW:0] del_count, fel_count;
  logic fel_push_valid, fel_push_ready, fel_rm_valid, fel_scan_start, fel_scan_busy, fel_scan_done;
  logic fel_overflow;
  nid_t fel_push_id, fel_min_id;
  time_t fel_push_t, fel_min_t;
  logic [AW-1:0] fel_rm_idx, fel_min_idx;
  int checks = 0, failures = 0;

  event_lists #(.DEL_AW(AW), .FEL_AW(AW)) dut (.*);

  nid_t  dm [$];
  nid_t  fi [$];
  time_t ft [$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_over = 0, n_scan = 0;

  initial begin
    int r, cyc, best;
    del_push_valid = 0; del_rm_valid = 0; del_push_id = 0; del_rm_idx = 0; del_rd_idx = 0;
    fel_push_valid = 0; fel_rm_valid = 0; fel_push_id = 0; fel_push_t = 0; fel_rm_idx = 0;
    fel_scan_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // DEL: push more often than remove in the first half so that it fills
      r = $urandom % 10;
      del_push_valid = 0; del_rm_valid = 0;
      fel_push_valid = 0; fel_rm_valid = 0;
      if (r < ((t < 300) ? 7 : 3)) begin
        del_push_valid = 1;
        del_push_id = nid_t'($urandom);
      end else if (dm.size() > 0 && r < 9) begin
        del_rm_valid = 1;
        del_rm_idx = AW'($urandom % dm.size());
      end
      del_rd_idx = (dm.size() > 0) ? AW'($urandom % dm.size()) : '0;
      #1;
      if (dm.size() > 0) begin
        checks++;
        if (del_rd_id != dm[del_rd_idx] || del_count != (AW+1)'(dm.size())) begin
          failures++;
          $display("DEL read %0d: %0d, expected %0d (count %0d/%0d)", del_rd_idx, del_rd_id,
                   dm[del_rd_idx], del_count, dm.size());
        end
      end
      @(posedge clk);
      if (del_rm_valid) begin
        dm[del_rm_idx] = dm[dm.size() - 1];
        void'(dm.pop_back());
      end else if (del_push_valid) begin
        if (dm.size() == CAP) begin
          n_over++;
          #1;
          checks++;
          if (!del_overflow) begin failures++; $display("DEL overflow not flagged"); end
        end else dm.push_back(del_push_id);
      end
      // FEL: push/remove, and a scan every 25 clocks
      @(negedge clk);
      del_push_valid = 0; del_rm_valid = 0;
      fel_push_valid = 0; fel_rm_valid = 0;
      if (t % 25 == 24) begin
        fel_scan_start = 1;
        @(negedge clk);
        fel_scan_start = 0;
        cyc = 1;
        while (!fel_scan_done) begin @(negedge clk); cyc++; end
        n_scan++;
        checks++;
        if (cyc != fi.size() + 2) begin
          failures++;
          $display("scan took %0d clocks for %0d entries", cyc, fi.size());
        end
        best = -1;
        foreach (ft[i]) if (best < 0 || ft[i] < ft[best]) best = i;
        checks++;
        if (best < 0 ? (fel_min_t != '1) :
            (fel_min_t != ft[best] || fel_min_id != fi[best] || fel_min_idx != AW'(best))) begin
          failures++;
          $display("scan: %0d/%0d/%0d, expected entry %0d", fel_min_t, fel_min_id, fel_min_idx, best);
        end
      end else begin
        r = $urandom % 10;
        if (r < 6) begin
          fel_push_valid = 1;
          fel_push_id = nid_t'($urandom);
          fel_push_t = time_t'($urandom % 100000);
        end else if (fi.size() > 0 && r < 9) begin
          fel_rm_valid = 1;
          fel_rm_idx = AW'($urandom % fi.size());
        end
        @(posedge clk);
        if (fel_rm_valid) begin
          fi[fel_rm_idx] = fi[fi.size() - 1]; void'(fi.pop_back());
          ft[fel_rm_idx] = ft[ft.size() - 1]; void'(ft.pop_back());
        end else if (fel_push_valid) begin
          if (fi.size() == CAP) begin
            n_over++;
            #1;
            checks++;
            if (!fel_overflow) begin failures++; $display("FEL overflow not flagged"); end
          end else begin
            fi.push_back(fel_push_id);
            ft.push_back(fel_push_t);
          end
        end
        #1;
        checks++;
        if (fel_count != (AW+1)'(fi.size())) begin
          failures++;
          $display("FEL count %0d, expected %0d", fel_count, fi.size());
        end
      end
    end
    checks++;
    if (n_over == 0 || n_scan == 0) begin failures++; $display("no overflow or no scan"); end
    $display("overflows %0d scans %0d", n_over, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
