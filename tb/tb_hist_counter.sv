// tb_hist_counter: self-checking test of the code-density histogram counter.
//
// A 4-bit, 5-bit-counter instance is cleared (the sweep must take 2^4
// cycles), then fed random codes with random valid gaps, including runs of
// the same code on consecutive cycles; a reference array counts the same
// hits (saturating at 31). Every counter is compared through the read port.
// Samples while count_en is low must not count, a second clear must zero all
// counters, and the saturation of a counter is exercised and counted.
module tb_hist_counter;
  localparam int QB = 4;
  localparam int CW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, clear_busy, count_en = 1'b0, sample_valid = 1'b0;
  logic [QB-1:0] sample_code = '0, rd_addr = '0;
  logic [CW-1:0] rd_data;
  int ref_cnt [2**QB];
  int checks = 0, failures = 0, n_sat = 0;

  hist_counter #(.QB(QB), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_clear();
    int cyc;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    cyc = 0;
    while (clear_busy) begin @(negedge clk); cyc++; end
    check(cyc == 2**QB, $sformatf("clear took %0d cycles", cyc));
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
  endtask

  task automatic compare_all(input string tag);
    for (int i = 0; i < 2**QB; i++) begin
      rd_addr = QB'(i);
      #1;
      check(int'(rd_data) == ref_cnt[i], $sformatf("%s: code %0d has %0d, expected %0d", tag, i, rd_data, ref_cnt[i]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_clear();
    compare_all("after clear");

    // random hits
    count_en = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      sample_valid = ($urandom_range(3) != 0);
      sample_code  = (t % 7 < 3) ? QB'(5) : QB'($urandom_range(2**QB - 1));
      if (sample_valid) begin
        if (ref_cnt[sample_code] < 2**CW - 1) ref_cnt[sample_code]++;
        else n_sat++;
      end
    end
    @(negedge clk) sample_valid = 1'b0;
    compare_all("random hits");
    check(n_sat > 0, "saturation never reached");

    // count_en low: nothing counts
    count_en = 1'b0;
    repeat (10) begin
      @(negedge clk);
      sample_valid = 1'b1;
      sample_code  = QB'($urandom_range(2**QB - 1));
    end
    @(negedge clk) sample_valid = 1'b0;
    compare_all("count_en low");

    do_clear();
    compare_all("second clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
