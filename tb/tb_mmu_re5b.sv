// tb_mmu_re5b: streams tagged message blocks through a small RE-5B memory
// and checks the reordering. Producer block pairs (x0,y0) then (x1,y1) per
// codeword must come out as (x0,x1) two clocks after x0 entered, then (y0,y1),
// while the next codeword streams in without a gap.
module tb_mmu_re5b;
  localparam int NA = 4, NC = 3, W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, phase = 0;
  logic [W-1:0] in_b [NA], in_d [NA], in_c [NC], in_e [NC], oa [NA], oc [NC];
  int checks = 0, failures = 0;
  mmu_re5b #(.NA(NA), .NC(NC), .W(W)) dut (.clk(clk), .en(en), .phase(phase),
    .in_b(in_b), .in_d(in_d), .in_c(in_c), .in_e(in_e), .out_a(oa), .out_c(oc));

  // tag: codeword w, block id (0=x0,1=y0,2=x1,3=y1), slot s
  function automatic logic [W-1:0] tag(input int w, input int blk, input int s);
    return W'((w % 8) * 32 + blk * 8 + s);
  endfunction

  initial begin
    int cyc = 0;
    en = 1;
    for (cyc = 0; cyc < 40; cyc++) begin
      automatic int w = cyc / 2;
      phase = cyc[0];
      for (int s = 0; s < NA; s++) begin in_b[s] = tag(w, 0, s); in_d[s] = tag(w, 1, s); end
      for (int s = 0; s < NC; s++) begin in_c[s] = tag(w, 2, s); in_e[s] = tag(w, 3, s); end
      #1;
      if (cyc >= 2) begin
        automatic int pw = (cyc - 2) / 2;     // codeword now being delivered
        for (int s = 0; s < NA; s++) begin
          checks++;
          if (oa[s] != tag(pw, phase ? 1 : 0, s)) begin failures++; if (failures < 5) $display("FAIL A cyc=%0d s=%0d %h", cyc, s, oa[s]); end
        end
        for (int s = 0; s < NC; s++) begin
          checks++;
          if (oc[s] != tag(pw, phase ? 3 : 2, s)) begin failures++; if (failures < 5) $display("FAIL C cyc=%0d s=%0d %h", cyc, s, oc[s]); end
        end
      end
      @(posedge clk); #1;
    end
    // hold: with en low nothing moves
    en = 0;
    begin
      automatic logic [W-1:0] keep = oa[0];
      repeat (3) @(posedge clk);
      #1; checks++; if (oa[0] != keep) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
