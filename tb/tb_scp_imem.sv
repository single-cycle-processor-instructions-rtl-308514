// tb_scp_imem: self-checking test of scp_imem.
//
// Gives one ROM instance the image whose word i is
// {i ^ 8'hA5, (7*i + 3) mod 256} and reads every word at its even byte
// address and at the odd address of the same word, comparing with that
// formula. A second instance with the default contents is checked at a few
// words of the default program and at nop-filled words. Reads are combinational: the word is checked 1 ns after the
// address changes, with no clock.
module tb_scp_imem;

  function automatic logic [4095:0] pattern();
    logic [4095:0] img;
    for (int i = 0; i < 256; i++) img[16*i +: 16] = {8'(i) ^ 8'hA5, 8'(7 * i + 3)};
    return img;
  endfunction

  logic [8:0]  addr;
  logic [15:0] instr, instr_blank;
  int checks = 0, failures = 0;

  scp_imem #(.WORDS(256), .ADDR_W(9), .CONTENTS(pattern())) dut (
    .addr(addr), .instr(instr));
  scp_imem dut_blank (.addr(addr), .instr(instr_blank));

  initial begin
    #100000;
    failures++;
    // Default program: ldi RA,0x12 / add RA,RB,RC / ldi RA,0x05 / unassigned.
    addr = 9'h000; #1; checks++; if (instr_blank !== 16'hC012) begin failures++; $display("FAIL word 0"); end
    addr = 9'h00A; #1; checks++; if (instr_blank !== 16'h4180) begin failures++; $display("FAIL word 5"); end
    addr = 9'h040; #1; checks++; if (instr_blank !== 16'hC005) begin failures++; $display("FAIL word 32"); end
    addr = 9'h053; #1; checks++; if (instr_blank !== 16'h7000) begin failures++; $display("FAIL word 41"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [15:0] expected;
      expected = {8'(i) ^ 8'hA5, 8'(7 * i + 3)};
      for (int b = 0; b < 2; b++) begin
        addr = 9'(2 * i + b);
        #1;
        checks++;
        if (instr !== expected) begin
          failures++;
          $display("FAIL addr %h got %h expected %h", addr, instr, expected);
        end
        if (i >= 64) begin
          checks++;
          if (instr_blank !== 16'hF000) begin
            failures++;
            $display("FAIL default ROM addr %h got %h", addr, instr_blank);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
