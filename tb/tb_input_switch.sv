// Self-checking testbench of the input switch: random samples on the four
// inputs and random selects on sixteen outputs; each output must equal the
// selected input of the previous clock.
module tb_input_switch;
  localparam int N_IN = 4, N_CH = 16, W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] in_data [N_IN];
  logic [1:0]          sel     [N_CH];
  logic signed [W-1:0] out_data [N_CH];
  logic signed [W-1:0] in_q    [N_IN];
  logic [1:0]          sel_q   [N_CH];
  int checks = 0, failures = 0;
  int hits [N_IN];

  input_switch #(.N_IN(N_IN), .N_CH(N_CH), .W(W)) dut (.clk, .rst_n, .in_data, .sel, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_IN; i++) begin in_data[i] = '0; hits[i] = 0; end
    for (int j = 0; j < N_CH; j++) sel[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) in_data[i] = W'($urandom);
      if (n % 7 == 0) for (int j = 0; j < N_CH; j++) sel[j] = 2'($urandom);
      in_q = in_data; sel_q = sel;
      @(negedge clk);
      for (int j = 0; j < N_CH; j++) begin
        checks++;
        hits[sel_q[j]]++;
        if (out_data[j] !== in_q[sel_q[j]]) begin
          failures++;
          if (failures < 10) $display("out %0d = %0d, expected input %0d = %0d", j, out_data[j], sel_q[j], in_q[sel_q[j]]);
        end
      end
    end
    for (int i = 0; i < N_IN; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("input %0d never selected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
