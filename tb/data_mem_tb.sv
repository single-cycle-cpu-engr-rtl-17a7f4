// data_mem_tb: random word writes and reads of a small data memory
// against an array model. Checks that Addr[1:0] is ignored, that Dout
// follows Addr within the cycle and that a write appears only after the
// rising edge and only when WrEn is high.
module data_mem_tb;
  localparam int unsigned WORDS = 32;
  logic        clk = 0;
  logic        wr_en;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk(clk), .wr_en(wr_en), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  function automatic int unsigned idx(input logic [31:0] a);
    return (a >> 2) % WORDS;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; addr = 0; din = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr_en = 1; addr = 32'(i * 4); din = $urandom; model[i] = din;
    end
    @(negedge clk); wr_en = 0;
    repeat (500) begin
      @(negedge clk);
      addr = $urandom; din = $urandom; wr_en = 1'($urandom);
      #1;
      checks++;
      if (dout !== model[idx(addr)]) begin failures++; $display("FAIL read %h: %h != %h", addr, dout, model[idx(addr)]); end
      if (wr_en) model[idx(addr)] = din;
      @(posedge clk); #1;
      checks++;
      if (dout !== model[idx(addr)]) begin failures++; $display("FAIL after write %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
