// tb_drive_current: driver supply current, coded against uncoded.
// Each open-drain driver sinks 20 mA while its pin is low. The testbench runs
// the link for 20000 bit slots of PRBS data and, in every slot, adds up the
// current of
//   - the 22 coded outputs (20 line pins + 2 dummy replicas), and
//   - the same 16 data bits sent uncoded on 16 pins (the bits the decoder
//     recovers from the line).
// The coded current must be exactly 11 x 20 mA = 220 mA in every slot, while
// the uncoded current swings with the data. A ZERO is taken as a low pin; by
// symmetry the coded result is the same for the opposite convention.
module tb_drive_current;
  import sgi_pkg::*;
  int checks = 0, failures = 0;
  localparam int SLOTS = 20000;
  localparam int MA_PER_DRIVER = 20;

  logic        clk = 1'b0, rst_n = 1'b0;
  sgi_word_t   tx_line;
  logic [1:0]  tx_dummy;
  logic [3:0]  tx_phi;
  logic        tx_line_valid;
  logic [15:0] rx_data;

  sgi_link_top dut (.clk, .rst_n, .tx_line, .tx_dummy, .tx_phi, .tx_line_valid,
                    .rx_word(tx_line), .rx_data);

  always #5 clk = ~clk;

  initial begin
    repeat (SLOTS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int coded_min = 1000, coded_max = 0, raw_min = 1000, raw_max = 0;
    int raw_step_max = 0, prev_raw = -1;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    while (!tx_line_valid) begin
      @(posedge clk);
      #1;
    end
    for (int n = 0; n < SLOTS; n++) begin
      int coded, raw;
      coded = MA_PER_DRIVER * (22 - $countones({tx_dummy, tx_line}));
      raw   = MA_PER_DRIVER * (16 - $countones(rx_data));
      if (coded < coded_min) coded_min = coded;
      if (coded > coded_max) coded_max = coded;
      if (raw < raw_min) raw_min = raw;
      if (raw > raw_max) raw_max = raw;
      if (prev_raw >= 0 && (raw > prev_raw ? raw - prev_raw : prev_raw - raw) > raw_step_max)
        raw_step_max = raw > prev_raw ? raw - prev_raw : prev_raw - raw;
      prev_raw = raw;
      checks++;
      if (coded != 11 * MA_PER_DRIVER) failures++;
      @(posedge clk);
      #1;
    end
    // the uncoded bus must actually vary, or the comparison says nothing
    checks++;
    if (raw_max - raw_min < 4 * MA_PER_DRIVER) failures++;
    $display("coded 22 outputs: %0d..%0d mA; uncoded 16 pins: %0d..%0d mA, largest step %0d mA",
             coded_min, coded_max, raw_min, raw_max, raw_step_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
