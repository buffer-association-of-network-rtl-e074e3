// tb_crossbar: self-checking test of the crossbar switch.
// Random data on every input and a random connection pattern (each output
// connected to one random input or to none) are applied. Each output must
// carry exactly its selected input's data, or zero with valid low.
module tb_crossbar;
  localparam int P = 8, W = 34;
  int checks = 0, failures = 0;
  logic [P-1:0][W-1:0] in_data, out_data;
  logic [P-1:0][P-1:0] sel;
  logic [P-1:0]        out_valid;
  int                  pick [P];

  crossbar #(.NUM_PORTS(P), .W(W)) dut (.in_data, .sel, .out_data, .out_valid);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < P; i++) in_data[i] = {2'($urandom), 32'($urandom)};
      sel = '0;
      for (int o = 0; o < P; o++) begin
        pick[o] = $urandom_range(0, P);   // P = not connected
        if (pick[o] < P) sel[o][pick[o]] = 1'b1;
      end
      #1;
      for (int o = 0; o < P; o++) begin
        if (pick[o] < P) check(out_valid[o] && out_data[o] == in_data[pick[o]],
                               $sformatf("out %0d from in %0d", o, pick[o]));
        else             check(!out_valid[o] && out_data[o] == '0, $sformatf("out %0d idle", o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
