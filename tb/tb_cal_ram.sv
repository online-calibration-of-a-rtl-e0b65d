// tb_cal_ram: self-checking test of the calibration working memory.
//
// Writes random words to every address of a 6-bit x 27-bit instance in a
// shuffled order, reads them back through the asynchronous port in the same
// cycle as the address changes, and checks that a write is visible after the
// clock edge and that a read-during-write cycle still shows the old word.
module tb_cal_ram;
  localparam int AW = 6;
  localparam int W  = 27;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [2**AW];
  int checks = 0, failures = 0;

  cal_ram #(.AW(AW), .W(W)) dut (.*);

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

  initial begin
    int order [2**AW];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = AW'(order[i]);
      wdata = W'({$urandom, $urandom});
      model[order[i]] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 2**AW; i++) begin
      raddr = AW'(i);
      #1 check(rdata == model[i], $sformatf("addr %0d", i));
    end
    // read during write: old value until the edge, new one after it
    @(negedge clk);
    raddr = 6'd9; waddr = 6'd9; wdata = ~model[9]; we = 1'b1;
    #1 check(rdata == model[9], "old word before the edge");
    @(posedge clk) #1 check(rdata == ~model[9], "new word after the edge");
    @(negedge clk) we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
