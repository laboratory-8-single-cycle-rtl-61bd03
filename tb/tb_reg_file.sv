// tb_reg_file: random writes and reads against a model array. Checks that
// the reset clears all registers, that writes land only when we is high,
// that both read ports are asynchronous and that register 0 reads as zero.
module tb_reg_file;
  logic        clk = 0, rst = 1, we = 0;
  logic [2:0]  ra1 = 0, ra2 = 0, wa = 0;
  logic [15:0] wd = 0, rd1, rd2;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst(rst), .we(we), .ra1(ra1), .ra2(ra2), .wa(wa),
                .wd(wd), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 8; r++) begin
      ra1 = 3'(r); ra2 = 3'(7 - r);
      #1;
      checks += 2;
      if (rd1 !== model[r])     begin failures++; $display("FAIL rd1 r%0d %h/%h", r, rd1, model[r]); end
      if (rd2 !== model[7 - r]) begin failures++; $display("FAIL rd2 r%0d %h/%h", 7 - r, rd2, model[7 - r]); end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1 rst = 0;
    check_reads();
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
      if (i % 10 == 0) check_reads();
      ra1 = wa; #1;
      checks++;
      if (rd1 !== model[wa]) begin failures++; $display("FAIL after write r%0d %h/%h", wa, rd1, model[wa]); end
    end
    rst = 1; @(posedge clk); #1 rst = 0; we = 0;
    foreach (model[i]) model[i] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
