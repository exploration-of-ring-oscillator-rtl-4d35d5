// Self-checking testbench for the daisy-chain cell.
//
// Builds a chain of three 16-bit cells (and a separate 8-bit cell), loads
// random counts, shifts the chain out one bit per cycle with random pauses
// and rebuilds the counts from the serial output: they must come out most
// significant bit first, cell 0 first, followed by zeros. It also checks
// that load wins over shift and that a cell holds its value without shift.
`timescale 1ns / 1ps
module tb_daisy_chain_cell;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  logic rst = 1'b1, load = 1'b0, shift = 1'b0;
  logic [15:0] d [3];
  logic [3:0]  chain;
  logic [7:0]  d8;
  logic        s8;

  always #5 clk = ~clk;

  assign chain[3] = 1'b0;
  for (genvar i = 0; i < 3; i++) begin : g_cell
    daisy_chain_cell dut (
      .clk(clk), .rst(rst), .load(load), .shift(shift),
      .d(d[i]), .sin(chain[i+1]), .sout(chain[i])
    );
  end
  daisy_chain_cell #(.N_COUNTER(8)) dut8 (
    .clk(clk), .rst(rst), .load(load), .shift(shift), .d(d8), .sin(1'b1), .sout(s8)
  );

  initial begin
    logic [63:0] got;
    logic [7:0]  got8;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 3; i++) d[i] = 16'($urandom);
      d8 = 8'($urandom);
      load = 1'b1; shift = (round % 2 == 1);  // load must win over shift
      @(posedge clk); #1;
      load = 1'b0; shift = 1'b0;
      repeat (3) @(posedge clk);
      #1;
      check(chain[0] == d[0][15], "cell does not hold its value");
      got = '0; got8 = '0;
      for (int b = 0; b < 64; b++) begin
        got = {got[62:0], chain[0]};
        if (b < 8) got8 = {got8[6:0], s8};
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #1;
        end
      end
      check(got == {d[0], d[1], d[2], 16'h0000},
            $sformatf("chain gave %016x expected %04x%04x%04x0000", got, d[0], d[1], d[2]));
      check(got8 == d8, $sformatf("8-bit cell gave %02x expected %02x", got8, d8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
