// tb_iq_downconverter - self-checking test of the multiplexer mixer.
//
// Drives random samples with random gaps in the valid strobe and checks each
// output pair against the cosine [1 0 -1 0] and sine [0 1 0 -1] sequences,
// computed here from the count of valid samples since reset. Also checks
// the one-clock latency and that the phase holds while in_valid is low.
module tb_iq_downconverter;
  localparam int unsigned IN_W = 3;

  logic                   clk = 1'b0;
  logic                   rst;
  logic                   in_valid;
  logic signed [IN_W-1:0] in_x;
  logic                   out_valid;
  logic signed [IN_W:0]   out_i, out_q;

  int checks = 0, failures = 0;
  int n_in = 0;

  iq_downconverter #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at sample %0d", what, n_in);
    end
  endtask

  initial begin
    int exp_i, exp_q, x;
    rst = 1'b1; in_valid = 1'b0; in_x = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x        = $signed($urandom_range(0, 2**IN_W - 1)) - 2**(IN_W-1);
      in_x     = IN_W'(x);
      @(posedge clk);
      #1;
      check(out_valid == in_valid, "valid latency");
      if (in_valid) begin
        case (n_in % 4)
          0: begin exp_i =  x; exp_q =  0; end
          1: begin exp_i =  0; exp_q =  x; end
          2: begin exp_i = -x; exp_q =  0; end
          default: begin exp_i = 0; exp_q = -x; end
        endcase
        check(int'(out_i) == exp_i, "I branch");
        check(int'(out_q) == exp_q, "Q branch");
        n_in++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
