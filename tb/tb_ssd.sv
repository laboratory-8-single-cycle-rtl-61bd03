// tb_ssd: shows random values and, over a full refresh period, checks that
// exactly one anode is low at a time, that every digit is visited, and that
// the cathodes show the digit's nibble (decoded here from the segment
// pattern of a standard hexadecimal display).
module tb_ssd;
  localparam int CNT_W = 4;
  logic        clk = 0;
  logic [15:0] digits = 0;
  logic [3:0]  an;
  logic [6:0]  cat;
  int checks = 0, failures = 0;

  ssd #(.CNT_W(CNT_W)) dut (.clk(clk), .digits(digits), .an(an), .cat(cat));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segments lit (active high, g..a) for each hex digit
  function automatic logic [6:0] seg(logic [3:0] n);
    logic [6:0] s [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return s[n];
  endfunction

  initial begin
    for (int v = 0; v < 40; v++) begin
      automatic bit [3:0] seen = 0;
      digits = (v < 16) ? {4{4'(v)}} : 16'($urandom);
      for (int c = 0; c < (1 << CNT_W); c++) begin
        @(negedge clk);
        checks++;
        if (!$onehot(~an)) begin failures++; $display("FAIL anodes %b", an); end
        for (int d = 0; d < 4; d++) if (!an[d]) begin
          seen[d] = 1;
          checks++;
          if (~cat !== seg(digits[d*4 +: 4])) begin
            failures++; $display("FAIL digit %0d of %h: cat %b", d, digits, cat);
          end
        end
      end
      checks++;
      if (seen != 4'hF) begin failures++; $display("FAIL not all digits shown"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
