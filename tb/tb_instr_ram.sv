// tb_instr_ram: self-checking test of the instruction RAM at its default
// size (16384 words).  Random words are loaded at random word addresses
// through the load port and fetched back; fetch data must appear one cycle
// after the fetch address and hold while fetch_en is low.
module tb_instr_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        fetch_en = 1'b0, load_we = 1'b0;
  logic [31:0] fetch_addr = '0, fetch_data, load_addr = '0, load_data = '0;
  instr_ram dut (.clk(clk), .fetch_en(fetch_en), .fetch_addr(fetch_addr), .fetch_data(fetch_data),
                 .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [int];
    logic [31:0] addrs [$], hold;
    logic [31:0] a;
    for (int i = 0; i < 500; i++) begin
      a = ($urandom % 16384) * 4;
      load_we <= 1'b1; load_addr <= a; load_data <= $urandom;
      @(posedge clk);
      model[int'(a)] = load_data;
      addrs.push_back(a);
    end
    load_we <= 1'b0;
    foreach (addrs[i]) begin
      fetch_en <= 1'b1; fetch_addr <= addrs[i];
      @(posedge clk);
      #1;
      checks++;
      if (fetch_data !== model[int'(addrs[i])]) begin failures++; $display("fetch %h: %h", addrs[i], fetch_data); end
    end
    hold = fetch_data;
    fetch_en <= 1'b0; fetch_addr <= addrs[0];
    repeat (3) @(posedge clk);
    checks++;
    if (fetch_data !== hold) begin failures++; $display("fetch data changed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
