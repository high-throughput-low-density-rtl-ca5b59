// tb_bnu: checks the bit node unit in both forms, combinational (PIPE=0) and
// pipelined (PIPE=1, result one clock later), against integer arithmetic:
// new C_i = clip(ch + sum of the other two messages, +-31), decoded bit =
// sign of ch + C1 + C2 + C3. Also checks that zero messages pass the channel
// value through.
module tb_bnu;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  msg_t c [3], o0 [3], o1 [3];
  ch_t  ch;
  logic d0, d1;
  int checks = 0, failures = 0;
  bnu #(.PIPE(1'b0)) u0 (.clk(clk), .c_in(c), .ch(ch), .c_out(o0), .dec(d0));
  bnu #(.PIPE(1'b1)) u1 (.clk(clk), .c_in(c), .ch(ch), .c_out(o1), .dec(d1));

  function automatic int sm(input msg_t m); return m[5] ? -int'(m[4:0]) : int'(m[4:0]); endfunction
  function automatic msg_t tosm(input int v);
    int a = (v < 0) ? -v : v;
    if (a > 31) a = 31;
    return {(v < 0) && (a != 0), 5'(a)};
  endfunction

  msg_t e [3]; logic ed;
  task automatic compute;
    int chv = ch[4] ? -int'(ch[3:0]) : int'(ch[3:0]);
    int tot = chv + sm(c[0]) + sm(c[1]) + sm(c[2]);
    for (int i = 0; i < 3; i++) e[i] = tosm(tot - sm(c[i]));
    ed = (tot < 0);
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 3; i++) c[i] = (n % 10 == 0) ? '0 : msg_t'($urandom);
      ch = ch_t'($urandom);
      compute();
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (o0[i] != e[i]) begin failures++; if (failures < 5) $display("FAIL comb n=%0d i=%0d %h %h", n, i, o0[i], e[i]); end
      end
      checks++; if (d0 != ed) failures++;
      if (n % 10 == 0) begin       // bypass: zero messages give the channel value
        checks++;
        if (o0[0] != tosm(ch[4] ? -int'(ch[3:0]) : int'(ch[3:0]))) failures++;
      end
      @(posedge clk); #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (o1[i] != e[i]) begin failures++; if (failures < 5) $display("FAIL pipe n=%0d i=%0d %h %h", n, i, o1[i], e[i]); end
      end
      checks++; if (d1 != ed) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
