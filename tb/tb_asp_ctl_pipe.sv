// tb_asp_ctl_pipe - micro-instructions and operands come out of IntMicroIR
// one cycle and of IntMicroIR2 two cycles after the pins; the NOP bit turns
// a cycle's micro-instruction into a NOP.
module tb_asp_ctl_pipe;
  import asp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  uinstr_t ctl, uir1, uir2;
  logic [31:0] dbus_i;
  logic [SECT_W-1:0] d1, d2;

  asp_ctl_pipe dut (.*);

  int checks = 0, failures = 0;
  uinstr_t hc [$];
  logic [23:0] hd [$];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; ctl = UNOP; dbus_i = '0;
    #12 rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if (hc.size() >= 2) begin
        checks++;
        if (uir1 !== hc[$] || d1 !== hd[$] || uir2 !== hc[$-1] || d2 !== hd[$-1]) begin
          failures++; $display("it %0d pipeline mismatch", it);
        end
      end
      ctl = uinstr_t'($urandom());
      dbus_i = $urandom();
      @(posedge clk);
      hc.push_back(dbus_i[31] ? UNOP : ctl);
      hd.push_back(dbus_i[23:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
