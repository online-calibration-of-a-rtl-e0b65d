// hist_counter: code-density histogram of one ADC.
//
// One saturating hit counter of CNT_W bits per output level, kept in a
// memory of 2^Q_BITS words (the "COUNTERS" and the histogram share of the
// "MEMORY" of the calibration processor). While 'count_en' is high every
// cycle with 'sample_valid' adds one hit to the counter addressed by
// 'sample_code' (read-modify-write in the same clock, so back-to-back hits
// on one code are never lost). A one-cycle 'clear' starts a sweep that zeroes
// all counters, one per clock; 'clear_busy' is high for those 2^Q_BITS
// cycles and samples are ignored meanwhile. 'rd_addr'/'rd_data' is an
// asynchronous read port for the DSP.
//
// The document gives the counters' function and their d-bit width; the
// memory organisation, saturation and the clearing sweep are this design's.
module hist_counter
  import cal_pkg::*;
#(
  parameter int unsigned QB = Q_BITS,
  parameter int unsigned CW = CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  output logic          clear_busy,
  input  logic          count_en,
  input  logic          sample_valid,
  input  logic [QB-1:0] sample_code,
  input  logic [QB-1:0] rd_addr,
  output logic [CW-1:0] rd_data
);

  logic [CW-1:0] mem [2**QB];
  logic [QB-1:0] clr_addr;
  logic [CW-1:0] cur;

  assign cur     = mem[sample_code];
  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clear_busy <= 1'b0;
      clr_addr   <= '0;
    end else if (clear) begin
      clear_busy <= 1'b1;
      clr_addr   <= '0;
    end else if (clear_busy) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == QB'(2**QB - 1)) clear_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clear_busy) begin
      mem[clr_addr] <= '0;
    end else if (count_en && sample_valid && !clear && (cur != '1)) begin
      mem[sample_code] <= cur + 1'b1;
    end
  end

endmodule
