// Self-checking testbench for the readout controller.
//
// Three 16-bit sensor counts sit in a shift register modelled here in place
// of the daisy chain (MSB of sensor 0 at the output). The byte sink accepts
// bytes with random stalls on tx_ready. For three frames the bench checks
// the byte sequence (header 0xA5, temperature code high/low, voltage code
// high/low, then the counts high byte first, sensor 0 first), that the chain
// is shifted exactly 48 times, that valid holds until accepted, and that done
// pulses once, only after the last byte.
`timescale 1ns / 1ps
module tb_readout_ctrl;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NS = 3, NC = 16;

  logic clk = 1'b0;
  logic rst = 1'b1, start = 1'b0;
  logic [9:0] temp, vcc;
  logic chain_shift;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready = 1'b0, done;
  logic [NS*NC-1:0] chain;

  always #5 clk = ~clk;

  readout_ctrl #(.N_SENSORS(NS), .N_COUNTER(NC)) dut (
    .clk(clk), .rst(rst), .start(start), .sysmon_temp(temp), .sysmon_vccint(vcc),
    .chain_out(chain[NS*NC-1]), .chain_shift(chain_shift),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready), .done(done)
  );

  // Daisy chain stand-in and byte sink.
  byte unsigned got [$];
  int shifts = 0, dones = 0;
  logic prev_stall = 1'b0;
  logic [7:0] prev_data;
  always @(posedge clk) begin
    if (chain_shift) begin
      chain <= {chain[NS*NC-2:0], 1'b0};
      shifts++;
    end
    if (tx_valid && tx_ready) got.push_back(tx_data);
    if (prev_stall) check(tx_valid && tx_data == prev_data, "byte withdrawn or changed before accept");
    prev_stall <= tx_valid && !tx_ready;
    prev_data  <= tx_data;
    if (done) begin
      dones++;
      check(got.size() == 5 + NS * NC / 8, "done before the last byte");
    end
    tx_ready <= ($urandom_range(0, 2) == 0);
  end

  initial begin
    logic [NC-1:0] s [NS];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      got.delete();
      shifts = 0; dones = 0;
      temp = 10'($urandom); vcc = 10'($urandom);
      for (int i = 0; i < NS; i++) s[i] = NC'($urandom);
      chain = {s[0], s[1], s[2]};
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      temp = '0; vcc = '0;  // codes must have been captured at start
      wait (dones == 1);
      repeat (30) @(posedge clk);
      check(dones == 1, $sformatf("frame %0d: %0d done pulses", f, dones));
      check(shifts == NS * NC, $sformatf("frame %0d: chain shifted %0d times", f, shifts));
      check(got.size() == 5 + 2 * NS, $sformatf("frame %0d: %0d bytes", f, got.size()));
      if (got.size() == 5 + 2 * NS) begin
        check(got[0] == 8'hA5, "header");
        check({got[1], got[2]} == 16'(chain_temp(f)), $sformatf("frame %0d temperature code", f));
        check({got[3], got[4]} == 16'(chain_vcc(f)), $sformatf("frame %0d voltage code", f));
        for (int i = 0; i < NS; i++)
          check({got[5 + 2 * i], got[6 + 2 * i]} == s[i],
                $sformatf("frame %0d sensor %0d: got %02x%02x expected %04x", f, i, got[5 + 2 * i], got[6 + 2 * i], s[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Codes as they were presented at start of each frame.
  logic [9:0] temps [3], vccs [3];
  int frame_no = 0;
  always @(posedge clk) if (start) begin
    temps[frame_no] = temp;
    vccs[frame_no]  = vcc;
    frame_no++;
  end
  function automatic logic [9:0] chain_temp(int f); return temps[f]; endfunction
  function automatic logic [9:0] chain_vcc(int f);  return vccs[f];  endfunction

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
