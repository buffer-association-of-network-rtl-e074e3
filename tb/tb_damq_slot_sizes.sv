// tb_damq_slot_sizes: runs the DAMQ buffer at each input-buffer size for
// which the input port was evaluated (4, 8, 16 and 32 slots). At each size one
// VC fills every slot, then the buffer drains while the freed slots are
// refilled by other VCs. The order and occupancy are checked against models.
module tb_damq_slot_sizes;
  logic clk = 0, rst = 1;
  logic [3:0] done;
  int c [4], f [4];

  always #5 clk = ~clk;

  damq_size_check #(.SLOTS(4))  u4  (.clk, .rst, .done(done[0]), .checks(c[0]), .failures(f[0]));
  damq_size_check #(.SLOTS(8))  u8  (.clk, .rst, .done(done[1]), .checks(c[1]), .failures(f[1]));
  damq_size_check #(.SLOTS(16)) u16 (.clk, .rst, .done(done[2]), .checks(c[2]), .failures(f[2]));
  damq_size_check #(.SLOTS(32)) u32 (.clk, .rst, .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
