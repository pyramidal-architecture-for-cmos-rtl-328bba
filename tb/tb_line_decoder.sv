// Self-checking testbench of line_decoder, the one-hot decoder used for the
// ring reset, ring select and column select lines. It sweeps every enable,
// address and limit value of a 32-line decoder (the sensor's ring count) and
// of a 5-line one, and compares the lines with the expected one-hot word.
module tb_line_decoder;
  localparam int unsigned L1 = 32, L2 = 5;
  logic en1, en2;
  logic [4:0] a1;  logic [5:0] lim1;  logic [L1-1:0] o1;
  logic [2:0] a2;  logic [3:0] lim2;  logic [L2-1:0] o2;
  int checks = 0, failures = 0;

  line_decoder #(.LINES(L1)) dut1 (.en(en1), .addr(a1), .limit(lim1), .lines(o1));
  line_decoder #(.LINES(L2)) dut2 (.en(en2), .addr(a2), .limit(lim2), .lines(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 32; a++)
        for (int l = 0; l <= 33; l++) begin
          logic [L1-1:0] exp;
          en1 = e[0]; a1 = a[4:0]; lim1 = l[5:0];
          #1;
          exp = (e == 1 && a < l) ? (32'd1 << a) : '0;
          checks++;
          if (o1 !== exp) begin
            failures++;
            if (failures < 10) $display("L32 en=%0d a=%0d lim=%0d got %h exp %h", e, a, l, o1, exp);
          end
        end
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 8; a++)
        for (int l = 0; l < 16; l++) begin
          logic [L2-1:0] exp;
          en2 = e[0]; a2 = a[2:0]; lim2 = l[3:0];
          #1;
          exp = (e == 1 && a < l && a < L2) ? L2'(1 << a) : '0;
          checks++;
          if (o2 !== exp) begin
            failures++;
            if (failures < 10) $display("L5 en=%0d a=%0d lim=%0d got %b exp %b", e, a, l, o2, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
