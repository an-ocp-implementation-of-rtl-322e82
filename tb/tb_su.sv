// tb_su: checks the Serialization Unit: after a load, the eight values leave
// in order d[0]..d[7] in the eight following cycles; loads every eight cycles
// give a continuous stream; the first flag is set on element 0 only; a load
// after a pause works; nothing is valid after the last element.
module tb_su;
  logic clk = 1'b0, rst_n, load, first;
  logic signed [30:0] d [8];
  logic signed [30:0] q;
  logic q_valid, q_first;
  int checks = 0, failures = 0;

  su dut (.*);
  always #5 clk = ~clk;

  logic signed [30:0] exp_q [$];
  bit exp_f [$];

  // monitor: compare every valid output with the expected queue
  always @(negedge clk) if (rst_n) begin
    if (q_valid) begin
      checks++;
      if (exp_q.size() == 0 || q != exp_q[0] || q_first != exp_f[0]) begin
        failures++;
        $display("FAIL output %0d", q);
      end
      if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_f.pop_front()); end
    end
  end

  task automatic do_load(bit f);
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      d[k] = 31'($urandom);
      exp_q.push_back(d[k]);
      exp_f.push_back(f && k == 0);
    end
    load = 1'b1; first = f;
    @(negedge clk);
    load = 1'b0; first = 1'b0;
    for (int k = 0; k < 8; k++) d[k] = '0;
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; first = 1'b0;
    for (int k = 0; k < 8; k++) d[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      do_load(r % 8 == 0);
      if (r % 5 == 4) repeat (12) @(negedge clk);   // pause, output must run dry
      else repeat (6) @(negedge clk);                 // next load 8 cycles later
    end
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d values missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
