// tb_mod_sub: self-checking test of the modular subtractor.  Random operands
// below the modulus are subtracted in single mode (q = 8380417) and in dual
// 16-bit mode (q = 3329 in both halves); the result and the per-lane
// borrow flags are compared with (a-b) mod q computed in the testbench.
module tb_mod_sub;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, q, c;
  logic dual;
  logic [1:0] ovf;
  mod_sub dut (.a(a), .b(b), .q(q), .dual(dual), .c(c), .borrow(ovf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned s;
    int unsigned al, ah, bl, bh, rl, rh;
    a = 0; b = 0; q = 0; dual = 0;
    for (int i = 0; i < 1000; i++) begin
      q = 32'd8380417; dual = 1'b0;
      a = $urandom % q; b = $urandom % q;
      if (i == 0) begin a = q - 1; b = q - 1; end
      #1;
      s = (longint'(a) + longint'(q) - longint'(b));
      checks++;
      if (c !== 32'(s % q) || ovf[1] !== (a < b)) begin
        failures++; $display("single %0d-%0d: got %0d", a, b, c);
      end
      q = {16'd0, 16'd3329}; dual = 1'b1;
      al = $urandom % 3329; ah = $urandom % 3329; bl = $urandom % 3329; bh = $urandom % 3329;
      a = {ah[15:0], al[15:0]}; b = {bh[15:0], bl[15:0]};
      q = {16'd3329, 16'd3329};
      #1;
      rl = (al + 3329 - bl) % 3329; rh = (ah + 3329 - bh) % 3329;
      checks++;
      if (c !== {rh[15:0], rl[15:0]} || ovf !== {ah < bh, al < bl}) begin
        failures++; $display("dual %h-%h: got %h", a, b, c);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
