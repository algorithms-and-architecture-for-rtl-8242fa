// tb_adf_sample_select: checks which ADC samples are kept for each
// sample_phase, the pair tag, the one-clock latency, and test-mode playback
// of a programmed sequence with its loop length.
module tb_adf_sample_select;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic adc_stb; logic [1:0] sample_idx; logic [ADC_W-1:0] adc;
  logic sample_phase = 0, test_mode = 0; logic [5:0] test_len_m1 = 0;
  logic test_we = 0; logic [5:0] test_waddr = 0; logic [ADC_W-1:0] test_wdata = 0;
  logic x_valid, x_pair; logic [ADC_W-1:0] x;
  int checks = 0, failures = 0;

  adf_sample_select dut (.*);

  always #5 clk = ~clk;

  // ADC model: a new sample every other clock, value = running sample count
  int cyc = 0, nsamp = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign adc_stb    = (cyc % 2 == 0);
  assign sample_idx = 2'((cyc / 2) % 4);
  assign adc        = ADC_W'(cyc / 2);

  // expected outputs, one clock behind
  logic exp_v; logic [ADC_W-1:0] exp_x; logic exp_pair; int tp = 0;
  logic [ADC_W-1:0] tmem [64];
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (x_valid !== exp_v || (exp_v && (x !== exp_x || x_pair !== exp_pair))) begin
        failures++;
        $display("FAIL cyc=%0d valid %b/%b x %0d/%0d pair %b/%b", cyc, x_valid, exp_v, x, exp_x, x_pair, exp_pair);
      end
      checks++;
    end
    exp_v <= rst_n && adc_stb && (sample_idx[0] == sample_phase);
    if (rst_n && adc_stb && (sample_idx[0] == sample_phase)) begin
      exp_x    <= test_mode ? tmem[tp] : adc;
      exp_pair <= sample_idx[1];
      if (test_mode) tp <= (tp == int'(test_len_m1)) ? 0 : tp + 1;
    end
    if (!test_mode) tp <= 0;
  end

  initial begin
    exp_v = 0; exp_x = 0; exp_pair = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    sample_phase = 1;
    repeat (40) @(posedge clk);
    // load a test sequence of 5 samples
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      test_we = 1; test_waddr = 6'(i); test_wdata = ADC_W'(1000 - 7 * i); tmem[i] = ADC_W'(1000 - 7 * i);
    end
    @(negedge clk); test_we = 0; test_len_m1 = 4; test_mode = 1;
    repeat (80) @(posedge clk);
    @(negedge clk); sample_phase = 0;
    repeat (40) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
