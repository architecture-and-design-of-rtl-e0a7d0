// tb_asp_tag_reg - checks every TAG multiplexer input, SETAG and the near /
// far shifts with the off-chip words at both ends against a reference.
module tb_asp_tag_reg;
  import asp_pkg::*;
  localparam int unsigned W = 40, B = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, setag;
  tag_src_e sel;
  logic [W-1:0] ml, selfir, tag;
  logic [B-1:0] lo_in, hi_in, lo_out, hi_out;

  asp_tag_reg #(.WORDS(W), .B(B)) dut (.*);

  logic [W-1:0] r;
  int checks = 0, failures = 0;
  int seen [8];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; sel = TAG_HOLD; setag = 0; ml = '0; selfir = '0; lo_in = '0; hi_in = '0;
    #12 rst_n = 1;
    r = '0;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      checks++;
      if (tag !== r || lo_out !== r[B-1:0] || hi_out !== r[W-1 -: B]) begin
        failures++; $display("it %0d tag %h exp %h", it, tag, r);
      end
      sel = tag_src_e'($urandom_range(7));
      setag = ($urandom_range(15) == 0);
      ml = {$urandom(), $urandom()};
      selfir = {$urandom(), $urandom()};
      lo_in = B'($urandom()); hi_in = B'($urandom());
      seen[sel]++;
      @(posedge clk);
      if (setag) r = '1;
      else begin
        logic [W-1:0] n;
        for (int j = 0; j < W; j++) begin
          case (sel)
            TAG_HOLD:   n[j] = r[j];
            TAG_GND:    n[j] = 1'b0;
            TAG_ML:     n[j] = ml[j];
            TAG_SELFIR: n[j] = selfir[j];
            TAG_NN:     n[j] = (j + 1 < W) ? r[j+1] : hi_in[j+1-W];
            TAG_NS:     n[j] = (j >= 1) ? r[j-1] : lo_in[B-1];
            TAG_FN:     n[j] = (j + B < W) ? r[j+B] : hi_in[j+B-W];
            TAG_FS:     n[j] = (j >= B) ? r[j-B] : lo_in[j];
            default:    n[j] = r[j];
          endcase
        end
        r = n;
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("select %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
