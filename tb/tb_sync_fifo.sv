// tb_sync_fifo: self-checking test of the first-word fall-through FIFO at its
// default size (50 x 32).  Random pushes and pops, including pushes when full
// and pops when empty, are compared every cycle with a queue model in the
// testbench: head data, fill level and the full/empty flags.  A clear must
// empty the FIFO.
module tb_sync_fifo;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, clear = 1'b0, push = 1'b0, pop = 1'b0, full, empty;
  logic [31:0] wdata = '0, rdata;
  logic [5:0]  count;
  sync_fifo dut (.clk(clk), .rst_n(rst_n), .clear(clear), .push(push), .wdata(wdata), .pop(pop),
    .rdata(rdata), .count(count), .full(full), .empty(empty));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model[$];
  int nfull = 0;
  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 8000; i++) begin
      bias = (i / 1000) % 2 ? 30 : 70;   // alternate filling and draining phases
      push  <= ($urandom % 100) < bias;
      pop   <= ($urandom % 100) < 100 - bias;
      clear <= (i == 5000);
      wdata <= $urandom;
      #1;
      checks++;
      if (count !== 6'(model.size()) || full !== (model.size() == 50) || empty !== (model.size() == 0)
          || (model.size() != 0 && rdata !== model[0])) begin
        failures++; $display("cycle %0d: count %0d exp %0d", i, count, model.size());
      end
      if (full) nfull++;
      @(posedge clk);
      if (clear) model.delete();
      else begin
        if (pop && model.size() != 0) begin
          void'(model.pop_front());
          if (push) model.push_back(wdata);
        end else if (push && model.size() < 50) model.push_back(wdata);
      end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
