// tb_correction_block: self-checking test of the LUT correction block.
//
// A 6-bit instance: with lut_valid low the output must be the level centre
// (k - N/2 + 1/2, 8 fraction bits) one clock after the code. Then random
// signed error values are written to every LUT entry, lut_valid is raised,
// and random codes (with valid gaps) must come out as centre + error one
// clock later; corr_valid must follow adc_valid with the same latency.
module tb_correction_block;
  localparam int QB = 6;
  localparam int BW = 16;
  localparam int OW = 24;
  localparam int N  = 1 << QB;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0, lut_valid = 1'b0, lut_we = 1'b0;
  logic [QB-1:0] adc_code = '0, lut_addr = '0;
  logic signed [BW-1:0] lut_data = '0;
  logic corr_valid;
  logic signed [OW-1:0] corr_out;
  int err_tab [N];
  int checks = 0, failures = 0;

  correction_block #(.QB(QB), .BW(BW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // centre of level k in 1/256 LSB: (k - N/2 + 1) * 256 - 128
  function automatic int centre(int k);
    return (k - N / 2 + 1) * 256 - 128;
  endfunction

  task automatic run(input int cycles, input bit use_lut);
    int prev_code;
    bit prev_valid;
    prev_valid = 1'b0;
    prev_code  = 0;
    repeat (cycles) begin
      @(negedge clk);
      if (prev_valid) begin
        check(corr_valid, "corr_valid missing");
        check(int'(corr_out) == centre(prev_code) + (use_lut ? err_tab[prev_code] : 0),
              $sformatf("code %0d: got %0d", prev_code, corr_out));
      end else check(!corr_valid, "spurious corr_valid");
      adc_valid  = ($urandom_range(4) != 0);
      adc_code   = QB'($urandom_range(N - 1));
      prev_valid = adc_valid;
      prev_code  = int'(adc_code);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(100, 1'b0);
    // fill the LUT while conversion continues
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      lut_we   = 1'b1;
      lut_addr = QB'(k);
      err_tab[k] = $urandom_range(20000) - 10000;
      lut_data = BW'(err_tab[k]);
    end
    @(negedge clk) lut_we = 1'b0;
    lut_valid = 1'b1;
    run(300, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
