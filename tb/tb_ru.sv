// tb_ru: checks the Round Unit (15 fractional bits in, 12-bit signed out):
// round half up, saturation at -2048 and 2047, the one-cycle delay of the
// result and of its valid and first flags, and zero output when not valid.
module tb_ru;
  logic clk = 1'b0, rst_n, d_valid, d_first;
  logic signed [30:0] d;
  logic signed [11:0] q;
  logic q_valid, q_first;
  int checks = 0, failures = 0;

  ru dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_round(longint x);
    longint r;
    r = x + 16384;
    // floor division by 2^15
    r = (r >= 0) ? r / 32768 : -((-r + 32767) / 32768);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return int'(r);
  endfunction

  initial begin
    longint x;
    rst_n = 1'b0; d_valid = 1'b0; d_first = 1'b0; d = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      case (t % 5)
        0: x = longint'($signed(31'($urandom)));
        1: x = (longint'($urandom) % 8192 - 64'sd4096) * 32768 + 16384;  // exact halves
        2: x = (longint'($urandom) % 8192 - 64'sd4096) * 32768 - 16385;
        3: x = (longint'($urandom) % 200000 - 64'sd100000);
        default: x = (longint'($urandom) % 4096 - 64'sd2048) * 32768;
      endcase
      d = 31'(x);
      d_valid = (t % 11 != 3);
      d_first = (t % 3 == 0);
      @(posedge clk); #1;
      checks++;
      if (q_valid != d_valid || q_first != (d_first && d_valid) ||
          (d_valid && int'(q) != ref_round(x)) || (!d_valid && q != 0)) begin
        failures++;
        $display("FAIL x=%0d got %0d exp %0d", x, q, ref_round(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
