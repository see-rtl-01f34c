// tb_fx_mul - checks the pipelined fixed-point multiplier: 300 random
// operand pairs (including saturating ones) go in back to back; each product
// must appear exactly 4 clocks later, equal to floor(a*b / 2^18) clipped to
// the 20-bit range, with out_valid high exactly in those clocks.
module tb_fx_mul;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [19:0] a, b, p;
  logic out_valid;
  int checks = 0, failures = 0;

  fx_mul #(.WA(20), .WB(20), .WO(20), .SHIFT(18), .LAT(4)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid, .p);

  longint exp_q [$];
  logic   vexp  [$];

  function automatic longint ref_mul(input longint x, input longint y);
    longint r;
    r = (x * y) >>> 18;
    if (r > 524287) r = 524287;
    if (r < -524288) r = -524288;
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin vexp.push_back(1'b0); exp_q.push_back(0); end
    for (int t = 0; t < 310; t++) begin
      @(negedge clk);
      if (t < 300) begin
        in_valid = ($urandom % 5) != 0;
        a = 20'($urandom);
        b = (t % 7 == 0) ? 20'sh7ffff : 20'($urandom);
      end else in_valid = 0;
      vexp.push_back(in_valid);
      exp_q.push_back(ref_mul(longint'(a), longint'(b)));
      // the output now belongs to the operands of 4 clocks ago
      begin
        logic ve; longint pe;
        ve = vexp.pop_front();
        pe = exp_q.pop_front();
        checks++;
        if (out_valid !== ve) begin
          failures++;
          $display("valid mismatch at %0d: %b vs %b", t, out_valid, ve);
        end else if (ve) begin
          checks++;
          if (longint'(p) != pe) begin
            failures++;
            $display("product mismatch at %0d: %0d vs %0d", t, p, pe);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
