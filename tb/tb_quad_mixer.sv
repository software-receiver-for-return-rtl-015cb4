// Self-checking testbench of the quadrature mixer: random samples and local
// oscillator values; expected i = floor(x*cos/32), q = floor(-x*sin/32) one
// clock later, computed with integer arithmetic in the testbench.
module tb_quad_mixer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [9:0]  x = '0;
  logic signed [11:0] lo_cos = '0, lo_sin = '0;
  logic signed [15:0] i_out, q_out;
  int checks = 0, failures = 0;

  quad_mixer #(.IN_W(10), .LO_W(12), .OUT_W(16)) dut (.clk, .rst_n, .x, .lo_cos, .lo_sin, .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div32(int v);
    return (v >= 0) ? v / 32 : -((-v + 31) / 32);
  endfunction

  initial begin
    int ei, eq;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case (n % 4)
        0: begin x = 10'sd511;  lo_cos = 12'sd2047;  lo_sin = -12'sd2047; end
        1: begin x = -10'sd512; lo_cos = -12'sd2047; lo_sin = 12'sd2047;  end
        default: begin x = 10'($urandom); lo_cos = 12'($urandom); lo_sin = 12'($urandom);
                       if (lo_cos == -12'sd2048) lo_cos = -12'sd2047;
                       if (lo_sin == -12'sd2048) lo_sin = -12'sd2047; end
      endcase
      ei = floor_div32(int'(x) * int'(lo_cos));
      eq = floor_div32(-(int'(x) * int'(lo_sin)));
      @(negedge clk);
      checks++;
      if (int'(i_out) != ei || int'(q_out) != eq) begin
        failures++;
        if (failures < 10) $display("x=%0d c=%0d s=%0d : i=%0d exp %0d q=%0d exp %0d", x, lo_cos, lo_sin, i_out, ei, q_out, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
