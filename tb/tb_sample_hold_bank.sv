// Self-checking testbench of the sample_hold_bank model. It loads random
// voltages into the signal bank (sh_sig) and different ones into the reset
// bank (sh_rst), changes the bus afterwards to make sure the capacitors hold,
// then walks the one-hot column select over all positions and checks that
// all eight outputs show the held pair of that position, and 0 with no
// position selected.
module tb_sample_hold_bank;
  import pyr_pkg::*;
  localparam int unsigned R = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sh_sig, sh_rst;
  logic [CODE_W-1:0] bus [N_CLUSTERS][R];
  logic [R-1:0] col_sel;
  logic [CODE_W-1:0] out_sig [N_CLUSTERS], out_rst [N_CLUSTERS];
  logic [CODE_W-1:0] ref_sig [N_CLUSTERS][R], ref_rst [N_CLUSTERS][R];

  sample_hold_bank #(.R(R)) dut (.clk, .rst_n, .sh_sig, .sh_rst, .diag_bus(bus), .col_sel,
                                 .out_sig, .out_rst);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_bus();
    for (int c = 0; c < N_CLUSTERS; c++)
      for (int k = 0; k < R; k++) bus[c][k] = CODE_W'($urandom_range(0, 4095));
  endtask

  initial begin
    sh_sig = 0; sh_rst = 0; col_sel = '0;
    randomize_bus();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // signal sampling over three cycles; the last bus value is kept
      sh_sig = 1;
      for (int n = 0; n < 3; n++) begin
        randomize_bus();
        ref_sig = bus;
        @(posedge clk); #1;
      end
      sh_sig = 0;
      randomize_bus();
      @(posedge clk); #1;
      sh_rst = 1;
      for (int n = 0; n < 2; n++) begin
        randomize_bus();
        ref_rst = bus;
        @(posedge clk); #1;
      end
      sh_rst = 0;
      randomize_bus();
      @(posedge clk); #1;
      for (int k = 0; k < R; k++) begin
        col_sel = R'(1) << k;
        randomize_bus();
        #1;
        for (int c = 0; c < N_CLUSTERS; c++) begin
          checks += 2;
          if (out_sig[c] !== ref_sig[c][k]) begin
            failures++;
            $display("FAIL sig c%0d k%0d got %0d exp %0d", c, k, out_sig[c], ref_sig[c][k]);
          end
          if (out_rst[c] !== ref_rst[c][k]) begin
            failures++;
            $display("FAIL rst c%0d k%0d got %0d exp %0d", c, k, out_rst[c], ref_rst[c][k]);
          end
        end
        @(posedge clk); #1;
      end
      col_sel = '0;
      #1;
      for (int c = 0; c < N_CLUSTERS; c++) begin
        checks++;
        if (out_sig[c] !== '0 || out_rst[c] !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
