// tb_encode_unit: self-checking test of the NTT-Lite encode unit.
// Random d-bit values are packed (encode) with random backpressure on the
// output, in single mode (d = 11 and d = 1) and dual mode (two 10-bit values
// per input word), with a final flush of the partial word.  The words must
// equal a little-endian bit packing computed in the testbench.  The packed
// words are then unpacked (decode) and must give back the values.
module tb_encode_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, clear = 1'b0, dec = 1'b0, dual = 1'b0, flush = 1'b0;
  logic [5:0]  d = 6'd11;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, empty;
  logic [31:0] in_data = '0, out_data;
  encode_unit dut (.clk(clk), .rst_n(rst_n), .clear(clear), .dec(dec), .dual(dual), .d(d),
    .flush(flush), .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
    .out_valid(out_valid), .out_data(out_data), .out_ready(out_ready), .empty(empty));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] got[$];
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) got.push_back(out_data);
    out_ready <= ($urandom % 4) != 0;
  end

  // stream items in, then wait until nout words came out
  task automatic stream(logic [31:0] items[$], int nout, logic do_flush);
    got.delete();
    foreach (items[i]) begin
      in_valid <= 1'b1; in_data <= items[i];
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    flush <= do_flush;
    while (got.size() < nout) @(posedge clk);
    repeat (4) @(posedge clk);
    flush <= 1'b0;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
  endtask

  task automatic test(int dd, logic du, int n);
    logic [31:0] vals[$], items[$], words[$], back[$];
    logic [31:0] mask;
    int nb, nw, per;
    mask = (dd == 32) ? '1 : ((32'd1 << dd) - 1);
    per = du ? 2 : 1;
    for (int i = 0; i < n * per; i++) vals.push_back($urandom & mask);
    for (int i = 0; i < n; i++) items.push_back(du ? {vals[2*i+1][15:0], vals[2*i][15:0]} : vals[i]);
    // reference packing
    nb = n * per * dd; nw = (nb + 31) / 32;
    for (int w = 0; w < nw; w++) words.push_back('0);
    for (int i = 0; i < n * per; i++)
      for (int b = 0; b < dd; b++) words[(i * dd + b) / 32][(i * dd + b) % 32] = vals[i][b];
    dec <= 1'b0; dual <= du; d <= 6'(dd);
    @(posedge clk);
    stream(items, nw, 1'b1);
    checks++;
    if (got.size() != nw) begin failures++; $display("d=%0d: %0d words, expected %0d", dd, got.size(), nw); end
    for (int w = 0; w < nw && w < got.size(); w++) begin
      checks++;
      if (got[w] !== words[w]) begin failures++; $display("d=%0d word %0d: %h exp %h", dd, w, got[w], words[w]); end
    end
    // decode back (only whole items)
    dec <= 1'b1;
    @(posedge clk);
    stream(words, n, 1'b0);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (i >= got.size() || got[i] !== items[i]) begin
        failures++; $display("decode d=%0d item %0d: %h exp %h", dd, i, (i < got.size()) ? got[i] : 32'hx, items[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    test(11, 1'b0, 64);
    test(1, 1'b0, 96);
    test(10, 1'b1, 48);
    test(12, 1'b1, 64);
    test(23, 1'b0, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
