// instr_mem_tb: fills a small instruction memory through the load port,
// then reads every word back combinationally and checks that word
// addresses wrap at the memory size.
module instr_mem_tb;
  localparam int unsigned WORDS = 64;
  logic        clk = 0;
  logic [29:0] addr, load_addr;
  logic [31:0] instr, load_data;
  logic        load_we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .instr(instr),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 30'(i); load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 30'(i); #1;
      checks++;
      if (instr !== model[i]) begin failures++; $display("FAIL word %0d %h != %h", i, instr, model[i]); end
      addr = 30'(i + WORDS); #1;
      checks++;
      if (instr !== model[i]) begin failures++; $display("FAIL wrap word %0d", i); end
    end
    // load_we low must not write
    @(negedge clk); load_addr = 3; load_data = ~model[3]; load_we = 0;
    @(negedge clk); addr = 3; #1;
    checks++;
    if (instr !== model[3]) begin failures++; $display("FAIL write without load_we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
