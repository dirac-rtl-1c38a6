// tb_dirac_translator: feeds the four interleaved results of random instants
// and checks that the complex USB/LSB odd/even sets and the tag appear
// together, one clock after the Q_LSB result, and hold until the next set.
module tb_dirac_translator;
  import dirac_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  stream_e in_idx = S_IUSB;
  logic [NC-1:0][CW-1:0] in_odd = '0, in_even = '0;
  col_tag_t tag_in = '0, tag_out;
  logic col_valid;
  cplx_c_t [NC-1:0] usb_odd, usb_even, lsb_odd, lsb_even;
  int checks = 0, failures = 0;
  logic [NC-1:0][CW-1:0] vo [4], ve [4];
  col_tag_t tg;

  dirac_translator #(.NCMF(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      tg = col_tag_t'($urandom);
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        in_valid = 1;
        in_idx   = stream_e'(s);
        for (int c = 0; c < NC; c++) begin
          vo[s][c] = CW'($urandom); ve[s][c] = CW'($urandom);
        end
        in_odd  = vo[s];
        in_even = ve[s];
        tag_in  = (s == 0) ? tg : col_tag_t'($urandom);
        @(negedge clk);
        in_valid = 0;
        in_odd   = '0;
        checks++;
        if (col_valid != (s == 3)) begin failures++; $display("col_valid wrong after slot %0d", s); end
      end
      @(posedge clk); #1;
      checks++;
      if (col_valid) begin failures++; $display("col_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent check of the output set whenever col_valid is seen.
  always @(posedge clk) if (rst_n && col_valid) begin
    checks++;
    if (tag_out != tg) begin failures++; $display("tag wrong"); end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (usb_odd[c] != '{vo[0][c], vo[1][c]} || usb_even[c] != '{ve[0][c], ve[1][c]} ||
          lsb_odd[c] != '{vo[2][c], vo[3][c]} || lsb_even[c] != '{ve[2][c], ve[3][c]}) begin
        failures++;
        $display("set wrong cmf %0d", c);
      end
    end
  end
endmodule
