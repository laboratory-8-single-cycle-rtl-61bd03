// tb_mem_unit: random reads and writes against a model of the data memory.
// Checks that the read is asynchronous (new address, data in the same
// cycle), that a write needs both MemWrite and the step enable and is seen
// after the clock edge, and that ALURes passes through unchanged.
module tb_mem_unit;
  logic        clk = 0, en = 0, mw = 0;
  logic [15:0] addr = 0, wdat = 0, md, ao;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  mem_unit dut (.clk(clk), .en(en), .mem_write(mw), .alu_res_in(addr), .rd2(wdat),
                .mem_data(md), .alu_res_out(ao));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      addr = 16'($urandom) & 16'hFF0F | 16'($urandom_range(0, 15)) << 4;
      if (i % 3 == 0) addr[7:0] = 8'($urandom_range(0, 15));  // revisit a few words
      wdat = 16'($urandom); mw = 1'($urandom); en = ($urandom % 4 != 0);
      #1;
      checks += 2;
      if (md !== model[addr[7:0]]) begin failures++; $display("FAIL read %h: %h exp %h", addr, md, model[addr[7:0]]); end
      if (ao !== addr)             begin failures++; $display("FAIL pass-through"); end
      @(posedge clk);
      if (mw && en) model[addr[7:0]] = wdat;
      #1;
      checks++;
      if (md !== model[addr[7:0]]) begin failures++; $display("FAIL after write %h: %h exp %h", addr, md, model[addr[7:0]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
