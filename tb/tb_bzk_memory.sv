// tb_bzk_memory: self-checking test of the 64 KB RAM.
// Writes random words at random even addresses, keeps a model in an
// associative array, and checks reads, the one-cycle read latency,
// read-before-write on the same address and that address bit 0 selects the
// same word. The whole address range is written and read once.
module tb_bzk_memory;
  logic clk = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] model[int];
  int checks = 0, failures = 0;

  bzk_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [15:0] ad, input logic [15:0] d);
    @(negedge clk); we = 1; addr = ad; wdata = d;
    model[int'(ad[15:1])] = d;
    @(negedge clk); we = 0;
  endtask

  task automatic rd_check(input logic [15:0] ad);
    @(negedge clk); we = 0; addr = ad;
    @(negedge clk);
    checks++;
    if (rdata !== model[int'(ad[15:1])]) begin
      failures++;
      if (failures < 10) $display("FAIL read %h = %h expected %h", ad, rdata, model[int'(ad[15:1])]);
    end
  endtask

  initial begin
    for (int i = 0; i < 32768; i++) begin
      @(negedge clk); we = 1; addr = 16'(2 * i); wdata = 16'(i * 7 + 3);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32768; i += 97) rd_check(16'(2 * i));
    repeat (2000) begin
      logic [15:0] ad;
      ad = 16'($urandom);
      if ($urandom % 2) wr(ad, 16'($urandom));
      else rd_check(ad);
    end
    // read-before-write: the old word appears in the write cycle
    wr(16'h1234, 16'hAAAA);
    @(negedge clk); we = 1; addr = 16'h1234; wdata = 16'h5555;
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== 16'hAAAA) begin failures++; $display("FAIL read-before-write %h", rdata); end
    model[16'h1234 >> 1] = 16'h5555;
    rd_check(16'h1235);   // odd address selects the same word
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
