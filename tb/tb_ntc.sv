// tb_ntc - topology unit on an 8 x 8 grid against a reference model of the
// two tag fields. 400 random commands (topology vector, fire, stop, release,
// excite) under all three connection schemes; checks every topology vector
// and the neuron's own status bit, the exact sequence of neurons emitted for
// the DEL, that a topology vector is ready 1 + fan-in clocks after the
// command is accepted, and that the tag fields were cleared after reset.
module tb_ntc;
  import see_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int XB = 3, YB = 3, N = 64;
  conn_t scheme;
  logic clearing, cmd_valid, cmd_ready, topo_valid, topo_ready, topo_self, del_valid, del_ready;
  logic [2:0] cmd_op;
  nid_t cmd_id, topo_id, del_id;
  logic [7:0] topo_vec;
  int checks = 0, failures = 0;

  ntc #(.XB(XB), .YB(YB)) dut (.clk, .rst_n, .scheme, .clearing, .cmd_valid, .cmd_ready, .cmd_op,
    .cmd_id, .topo_valid, .topo_ready, .topo_id, .topo_vec, .topo_self, .del_valid, .del_ready,
    .del_id);

  logic rf [N];   // reference fire tags
  logic re [N];   // reference excitation tags
  int   emitted [$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour j of neuron k, -1 outside the grid
  function automatic int nbr(input int k, input int j, input conn_t s, input bit pre);
    int x, y;
    int dxs [8] = '{-1, 1, 0, 0, -1, 1, -1, 1};
    int dys [8] = '{0, 0, -1, 1, -1, -1, 1, 1};
    x = k % 8; y = k / 8;
    if (s == CONN_P2P) y += pre ? -1 : 1;
    else begin x += dxs[j]; y += dys[j]; end
    if (x < 0 || x > 7 || y < 0 || y > 7) return -1;
    return y * 8 + x;
  endfunction
  function automatic int fanin(input conn_t s);
    return (s == CONN_P2P) ? 1 : (s == CONN_NN4) ? 4 : 8;
  endfunction

  // collect DEL emissions, with back-pressure now and then
  always @(posedge clk) if (del_valid && del_ready) emitted.push_back(int'(del_id));
  always @(negedge clk) del_ready <= ($urandom % 3) != 0;

  int n_fire_emits = 0, n_topo_hits = 0;

  initial begin
    int op, k, cyc, q;
    int expv [$];
    logic [7:0] ev;
    cmd_valid = 0; cmd_op = 0; cmd_id = 0; topo_ready = 0; scheme = CONN_NN4;
    for (int i = 0; i < N; i++) begin rf[i] = 0; re[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!clearing) begin failures++; $display("not clearing after reset"); end
    while (clearing) @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      if (t % 130 == 0) scheme = conn_t'((t / 130) % 3);
      op = $urandom % 10;
      k = $urandom % N;
      cmd_op = (op < 4) ? 3'd0 : (op < 6) ? 3'd1 : (op < 8) ? 3'd2 : (op < 9) ? 3'd3 : 3'd4;
      cmd_id = nid_t'(k);
      emitted.delete();
      expv.delete();
      // reference
      case (cmd_op)
        3'd0: begin
          ev = '0;
          for (int j = 0; j < fanin(scheme); j++) begin
            q = nbr(k, j, scheme, 1);
            if (q >= 0 && rf[q]) ev[j] = 1'b1;
          end
        end
        3'd1: begin
          rf[k] = 1; re[k] = 1;
          for (int j = 0; j < fanin(scheme); j++) begin
            q = nbr(k, j, scheme, 0);
            if (q >= 0 && !re[q]) begin re[q] = 1; expv.push_back(q); end
          end
        end
        3'd2: rf[k] = 0;
        3'd3: re[k] = 0;
        default: if (!re[k]) begin re[k] = 1; expv.push_back(k); end
      endcase
      @(negedge clk);
      cmd_valid = 1;
      while (!cmd_ready) @(negedge clk);
      @(negedge clk);
      cmd_valid = 0;
      if (cmd_op == 3'd0) begin
        cyc = 1;
        while (!topo_valid) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 1 + fanin(scheme)) begin
          failures++;
          $display("topology vector after %0d clocks, expected %0d", cyc, 1 + fanin(scheme));
        end
        checks++;
        if (topo_vec != ev || topo_self != rf[k] || topo_id != nid_t'(k)) begin
          failures++;
          $display("cmd %0d: vector %b self %b, expected %b %b", t, topo_vec, topo_self, ev, rf[k]);
        end
        if (ev != 0) n_topo_hits++;
        topo_ready = 1;
        @(negedge clk);
        topo_ready = 0;
      end
      while (!cmd_ready) @(negedge clk);
      checks++;
      if (emitted.size() != expv.size()) begin
        failures++;
        $display("cmd %0d op %0d: %0d emitted, expected %0d", t, cmd_op, emitted.size(), expv.size());
      end else begin
        foreach (expv[i]) if (emitted[i] != expv[i]) begin
          failures++;
          $display("cmd %0d: emitted %0d, expected %0d", t, emitted[i], expv[i]);
        end
      end
      if (cmd_op == 3'd1) n_fire_emits += expv.size();
    end
    checks++;
    if (n_fire_emits == 0 || n_topo_hits == 0) begin
      failures++;
      $display("projective field emitted %0d, non-zero vectors %0d", n_fire_emits, n_topo_hits);
    end
    $display("projective-field emissions %0d, non-zero topology vectors %0d", n_fire_emits, n_topo_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
