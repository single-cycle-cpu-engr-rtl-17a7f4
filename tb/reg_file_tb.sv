// reg_file_tb: random writes and reads of the register file compared with
// an array model. Checks that both read ports are combinational, that a
// write lands at the rising edge (old value visible before it), that
// WrEn low blocks the write and that register 0 stays zero.
module reg_file_tb;
  logic        clk = 0;
  logic [4:0]  aa, ab, aw;
  logic [31:0] da, db, dw;
  logic        wr_en;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .aa(aa), .ab(ab), .da(da), .db(db),
                .aw(aw), .dw(dw), .wr_en(wr_en));

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); ab = 5'(31 - i);
      #1;
      checks += 2;
      if (da !== model[i])      begin failures++; $display("FAIL Da r%0d %h != %h", i, da, model[i]); end
      if (db !== model[31 - i]) begin failures++; $display("FAIL Db r%0d %h != %h", 31 - i, db, model[31 - i]); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; aw = 0; dw = 0; aa = 0; ab = 0;
    // initialise every register through the write port
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      aw = 5'(i); dw = $urandom; wr_en = 1;
      model[i] = (i == 0) ? 32'd0 : dw;
    end
    @(negedge clk); wr_en = 0;
    check_reads();
    repeat (400) begin
      @(negedge clk);
      aw = 5'($urandom); dw = $urandom; wr_en = 1'($urandom);
      aa = aw; ab = 5'($urandom);
      #1;
      // before the edge the old value is read
      checks++;
      if (da !== model[aw]) begin failures++; $display("FAIL pre-edge r%0d", aw); end
      if (wr_en && aw != 0) model[aw] = dw;
      @(posedge clk); #1;
      checks += 2;
      if (da !== model[aa]) begin failures++; $display("FAIL post-edge Da r%0d %h != %h", aa, da, model[aa]); end
      if (db !== model[ab]) begin failures++; $display("FAIL post-edge Db r%0d", ab); end
    end
    @(negedge clk); wr_en = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
