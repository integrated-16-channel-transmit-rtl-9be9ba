// tb_tx_delay_lut: self-checking test of the transmit delay-profile memory.
//
// Fills every (profile, channel) word with a random value, kept in a model
// array, then reads all words back in random order and checks each one
// arrives exactly one clock after its address.
`timescale 1ps / 1ps
module tb_tx_delay_lut;
  import bf_pkg::*;

  localparam int unsigned PROFILES = 64;
  localparam int unsigned PW = $clog2(PROFILES);

  logic clk = 1'b0, we = 1'b0;
  logic [PW-1:0] wprof = '0, rprof = '0;
  logic [3:0] wch = '0, rch = '0;
  logic [DELAY_W-1:0] wdata = '0, rdata;
  logic [DELAY_W-1:0] model [PROFILES][NUM_CH];

  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  tx_delay_lut #(.PROFILES(PROFILES)) dut (.*);

  initial begin
    for (int p = 0; p < PROFILES; p++)
      for (int c = 0; c < NUM_CH; c++) begin
        model[p][c] = 25'($urandom);
        @(negedge clk);
        we = 1'b1; wprof = PW'(p); wch = 4'(c); wdata = model[p][c];
      end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      int p, c;
      p = $urandom_range(0, PROFILES - 1);
      c = $urandom_range(0, NUM_CH - 1);
      rprof = PW'(p); rch = 4'(c);
      @(negedge clk);
      checks++;
      if (rdata !== model[p][c]) begin
        failures++;
        $display("FAIL: profile %0d channel %0d read %h expected %h", p, c, rdata, model[p][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
