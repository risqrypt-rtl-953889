// tb_sampling_unit: self-checking test of the NTT-Lite sampling unit.
// Random fields are streamed in with random output backpressure:
//   CBD with eta = 2 and eta = 4 (single and dual mode, q = 3329): each
//   output is (popcount(low eta bits) - popcount(high eta bits)) mod q;
//   rejection sampling of 23-bit fields against beta = 8380417 (single), and
//   of 12-bit fields against 3329 in dual mode, where accepted values must
//   come out in order, two per word;
//   centred rejection: accepted x gives (cen - x) mod q.
// Expected streams are computed in the testbench.
module tb_sampling_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, clear = 1'b0, rej = 1'b0, dual = 1'b0, center = 1'b0;
  logic [3:0]  eta = 4'd2;
  logic [31:0] q = 32'd3329, beta = 32'd3329, cen = '0;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [31:0] in_data = '0, out_data;
  sampling_unit dut (.clk(clk), .rst_n(rst_n), .clear(clear), .rej(rej), .dual(dual),
    .center(center), .eta(eta), .q(q), .beta(beta), .cen(cen), .in_valid(in_valid),
    .in_data(in_data), .in_ready(in_ready), .out_valid(out_valid), .out_data(out_data),
    .out_ready(out_ready));

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

  task automatic stream(logic [31:0] items[$], int nout);
    got.delete();
    foreach (items[i]) begin
      in_valid <= 1'b1; in_data <= items[i];
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != nout) begin failures++; $display("%0d outputs, expected %0d", got.size(), nout); end
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
  endtask

  function automatic int cbd(logic [15:0] f, int e, int m);
    int a = 0, b = 0;
    for (int i = 0; i < e; i++) begin a += f[i]; b += f[e + i]; end
    return (a - b + m) % m;
  endfunction

  task automatic compare(logic [31:0] e[$], string what);
    for (int i = 0; i < e.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== e[i]) begin failures++; $display("%s %0d: %h exp %h", what, i, got[i], e[i]); end
    end
  endtask

  initial begin
    logic [31:0] items[$], e[$], acc[$];
    logic [15:0] f0, f1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // CBD single / dual
    for (int et = 2; et <= 4; et += 2) begin
      for (int du = 0; du < 2; du++) begin
        items.delete(); e.delete();
        for (int i = 0; i < 100; i++) begin
          f0 = 16'($urandom) & 16'((1 << (2 * et)) - 1);
          f1 = 16'($urandom) & 16'((1 << (2 * et)) - 1);
          items.push_back(du ? {f1, f0} : {16'd0, f0});
          e.push_back(du ? {16'(cbd(f1, et, 3329)), 16'(cbd(f0, et, 3329))} : 32'(cbd(f0, et, 3329)));
        end
        rej <= 1'b0; dual <= 1'(du); eta <= 4'(et); q <= 32'd3329; center <= 1'b0;
        @(posedge clk);
        stream(items, 100);
        compare(e, "CBD");
      end
    end
    // single rejection, q = beta = 8380417, 23-bit fields; then centred
    for (int c = 0; c < 2; c++) begin
      items.delete(); e.delete();
      for (int i = 0; i < 200; i++) begin
        items.push_back($urandom & 32'h7F_FFFF);
        if (items[i] < 8380417)
          e.push_back(c ? 32'((longint'(4190208) + 8380417 - longint'(items[i])) % 8380417) : items[i]);
      end
      rej <= 1'b1; dual <= 1'b0; q <= 32'd8380417; beta <= 32'd8380417; cen <= 32'd4190208;
      center <= 1'(c);
      @(posedge clk);
      stream(items, e.size());
      compare(e, c ? "centred rejection" : "rejection");
    end
    // dual rejection, 12-bit fields against 3329
    items.delete(); e.delete(); acc.delete();
    for (int i = 0; i < 200; i++) begin
      f0 = 16'($urandom & 32'hFFF); f1 = 16'($urandom & 32'hFFF);
      items.push_back({f1, f0});
      if (f0 < 3329) acc.push_back(32'(f0));
      if (f1 < 3329) acc.push_back(32'(f1));
    end
    for (int i = 0; i + 1 < acc.size(); i += 2) e.push_back({acc[i + 1][15:0], acc[i][15:0]});
    rej <= 1'b1; dual <= 1'b1; q <= 32'd3329; beta <= 32'd3329; center <= 1'b0;
    @(posedge clk);
    stream(items, e.size());
    compare(e, "dual rejection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
