// Writes random 4-bit words to random addresses of a 576-word bank, keeps
// a copy in a software array, and checks that every read returns the last
// word written one clock after its address, including read-before-write
// when an address is written and read in the same cycle.
module tb_bank_ram;
  localparam int DEPTH = 576;
  logic       clk = 0, we = 0;
  logic [9:0] addr = '0;
  logic [3:0] din = '0, dout;
  logic [3:0] model [DEPTH];
  int checks = 0, failures = 0;

  bank_ram #(.DEPTH(DEPTH), .DATA_W(4)) dut (
    .clk(clk), .we(we), .addr(addr), .din(din), .dout(dout)
  );

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    // Fill every word first.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; addr = 10'(a); din = 4'($urandom); model[a] = din;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we   = $urandom_range(0, 2) == 0;
      addr = 10'($urandom_range(0, DEPTH - 1));
      din  = 4'($urandom);
      exp  = int'(model[addr]);     // read-before-write
      if (we) model[addr] = din;
      @(negedge clk);
      checks++;
      if (int'(dout) != exp) begin
        failures++; $display("FAIL addr=%0d dout=%0d expected %0d", addr, dout, exp);
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
