// tb_ring_stop: random traffic through one ring stop.  Bit 7 of a message
// asks for ejection, bit 6 for forwarding (both: broadcast, neither: drop).
// A scoreboard built from the input handshakes checks that the next-stop
// link and the ejection port carry exactly the expected messages in order,
// that injection never overtakes through traffic, and that everything sent
// comes out.
`timescale 1ns/1ps
module tb_ring_stop;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, inj_valid, inj_ready, ej_valid, ej_ready;
  logic [7:0] in_data, out_data, inj_data, ej_data;

  ring_stop #(.W(8)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .in_for_me(in_data[7]), .in_pass(in_data[6]),
    .out_valid, .out_data, .out_ready,
    .inj_valid, .inj_data, .inj_ready,
    .ej_valid, .ej_data, .ej_ready
  );

  logic [7:0] exp_out [$], exp_ej [$];
  int n_in = 0, n_inj = 0, n_out = 0, n_ej = 0, n_bcast = 0, n_drop = 0, n_blocked_inj = 0;

  always @(posedge clk) if (rst_n) begin
    // scoreboard update from the handshakes of this cycle
    if (in_valid && in_ready) begin
      n_in++;
      if (in_data[6]) exp_out.push_back(in_data);
      if (in_data[7]) exp_ej.push_back(in_data);
      if (in_data[6] && in_data[7]) n_bcast++;
      if (!in_data[6] && !in_data[7]) n_drop++;
    end
    if (inj_valid && inj_ready) begin
      n_inj++;
      checks++;
      if (in_valid && in_data[6]) begin
        failures++;
        $display("FAIL: injection overtook through traffic");
      end
      exp_out.push_back(inj_data);
    end else if (inj_valid && in_valid && in_data[6]) n_blocked_inj++;
    if (out_valid && out_ready) begin
      n_out++;
      checks++;
      if (exp_out.size() == 0 || exp_out[0] != out_data) begin
        failures++;
        $display("FAIL: out %h expected %h", out_data, exp_out.size() ? exp_out[0] : 8'hxx);
      end
      if (exp_out.size()) void'(exp_out.pop_front());
    end
    if (ej_valid && ej_ready) begin
      n_ej++;
      checks++;
      if (ej_data !== in_data || !in_data[7]) begin
        failures++;
        $display("FAIL: ejected %h", ej_data);
      end
      if (exp_ej.size() == 0 || exp_ej[0] != ej_data) begin
        failures++;
        $display("FAIL: ej %h out of order", ej_data);
      end
    end
  end
  // exp_ej is consumed by the same-cycle handshake
  always @(negedge clk) if (rst_n && exp_ej.size() > 0) void'(exp_ej.pop_front());

  initial begin
    in_valid = 0; inj_valid = 0; out_ready = 0; ej_ready = 0; in_data = 0; inj_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      if (!in_valid || in_ready_q) begin
        in_valid = ($urandom_range(2) != 0) && c < 3800;
        in_data  = {2'($urandom), 6'(c)};
      end
      if (!inj_valid || inj_ready_q) begin
        inj_valid = ($urandom_range(2) == 0) && c < 3800;
        inj_data  = {2'b01, 6'($urandom)};
      end
      out_ready = ($urandom_range(3) != 0);
      ej_ready  = ($urandom_range(3) != 0);
    end
    out_ready = 1; ej_ready = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_out.size() != 0) begin failures++; $display("FAIL: %0d messages lost", exp_out.size()); end
    checks++;
    if (n_bcast == 0 || n_drop == 0 || n_blocked_inj == 0) begin
      failures++; $display("FAIL: coverage bcast=%0d drop=%0d blocked=%0d", n_bcast, n_drop, n_blocked_inj);
    end
    $display("in=%0d inj=%0d out=%0d ej=%0d", n_in, n_inj, n_out, n_ej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // handshake outcome of the previous edge, sampled before it
  logic in_ready_q, inj_ready_q;
  always @(posedge clk) begin
    in_ready_q  <= in_valid && in_ready;
    inj_ready_q <= inj_valid && inj_ready;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
