// tb_output_port: self-checking test of the output latch and credit counter.
// Random flits are sent only while has_credit is high, and credit_in pulses
// are returned at random without exceeding the start value. The test checks
// that each flit appears one edge later with a one-cycle out_avail, that the
// last flit is held while idle, and that the credit count follows the model,
// including stalls at zero credits.
module tb_output_port;
  localparam int W = 32, V = 4, C = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_valid, credit_in, has_credit, out_avail;
  logic [W-1:0] in_data, out_data, exp_data;
  logic [1:0] in_vc, out_vc, exp_vc;
  logic [2:0] credits;
  int model_cr, zero_cycles = 0;
  bit sent;

  output_port #(.DATA_W(W), .NUM_VC(V), .CREDITS(C)) dut (
    .clk, .rst, .in_valid, .in_data, .in_vc, .credit_in,
    .has_credit, .out_data, .out_vc, .out_avail, .credits);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; credit_in = 0; in_data = 0; in_vc = 0;
    exp_data = 0; exp_vc = 0; model_cr = C; sent = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    check(out_data == 0 && !out_avail && credits == 3'(C), "reset state");
    for (int t = 0; t < 1000; t++) begin
      check(has_credit == (model_cr != 0), $sformatf("has_credit, model %0d", model_cr));
      check(credits == 3'(model_cr), $sformatf("credits %0d exp %0d", credits, model_cr));
      if (model_cr == 0) zero_cycles++;
      in_valid  = has_credit && $urandom_range(0, 9) < 7;
      in_data   = $urandom;
      in_vc     = 2'($urandom);
      credit_in = (model_cr - int'(in_valid) < C) && $urandom_range(0, 9) < ((t / 100) % 2 ? 6 : 2);
      @(negedge clk);
      sent = in_valid;
      if (in_valid) begin exp_data = in_data; exp_vc = in_vc; end
      model_cr = model_cr - int'(in_valid) + int'(credit_in);
      in_valid = 0; credit_in = 0;
      check(out_avail == sent, "out_avail one cycle after capture");
      check(out_data == exp_data && out_vc == exp_vc, "data held or updated");
    end
    check(zero_cycles > 0, "credits ran out at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
