// tb_route_decode: self-checking test of the decode logic.
// Sweeps every destination value with random payload bits, for an 8-port
// and a 5-port decoder. The expected port is computed from the flit's top
// bits; a 5-port decoder must reject destinations 5..7.
module tb_route_decode;
  int checks = 0, failures = 0;

  logic [31:0] flit8, flit5;
  logic [2:0]  dest8, dest5;
  logic [7:0]  oh8;
  logic [4:0]  oh5;
  logic        ok8, ok5;

  route_decode #(.NUM_PORTS(8), .DATA_W(32)) dut8 (.flit(flit8), .dest(dest8), .dest_onehot(oh8), .dest_ok(ok8));
  route_decode #(.NUM_PORTS(5), .DATA_W(32)) dut5 (.flit(flit5), .dest(dest5), .dest_onehot(oh5), .dest_ok(ok5));

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
    for (int rep = 0; rep < 20; rep++) begin
      for (int d = 0; d < 8; d++) begin
        flit8 = {3'(d), 29'($urandom)};
        flit5 = {3'(d), 29'($urandom)};
        #1;
        check(dest8 == 3'(d) && ok8 && oh8 == (8'b1 << d), $sformatf("8-port dest %0d", d));
        if (d < 5) check(ok5 && oh5 == (5'b1 << d) && dest5 == 3'(d), $sformatf("5-port dest %0d", d));
        else       check(!ok5 && oh5 == '0, $sformatf("5-port invalid dest %0d", d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
