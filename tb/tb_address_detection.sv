// tb_address_detection: frames with random first bytes pass the filter for
// each setting of RxAD and RA6/7. With detection off every frame passes
// whole. With it on, a frame passes whole when its first byte equals the
// Receive Address on bits 7..1 (RA6/7 = 0) or 7..2 (RA6/7 = 1); otherwise it
// must yield exactly seven content bits, a drop symbol and nothing more
// until the flag.
module tb_address_detection;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, rxad = 0, ra67 = 0;
  logic [7:0] rx_addr = 8'h00;
  rx_sym_t in_sym = '0, out_sym;
  int checks = 0, failures = 0, drops = 0, passes = 0;
  bitq_t cur;
  bit dropped;

  address_detection dut (.clk, .rst_n, .clr, .rxad, .ra67, .rx_addr, .in_sym, .out_sym);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_sym.valid) cur.push_back(out_sym.b);
    if (out_sym.drop) dropped = 1;
  end

  task automatic put(rx_sym_t s);
    @(negedge clk);
    #1 in_sym = s;
    @(negedge clk);
    #1 in_sym = '0;
  endtask

  initial begin
    bitq_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      logic [7:0] a;
      bit match;
      rxad = (f % 4) != 0;
      ra67 = (f % 8) >= 4;
      rx_addr = 8'($urandom);
      case ($urandom_range(0, 3))
        0: a = rx_addr;
        1: a = rx_addr ^ 8'h01;                      // differs in bit 0 only
        2: a = rx_addr ^ 8'h02;                      // differs in bit 1
        default: a = 8'($urandom);
      endcase
      match = ra67 ? (a[7:2] == rx_addr[7:2]) : (a[7:1] == rx_addr[7:1]);
      c.delete();
      for (int k = 0; k < 8; k++) c.push_back(a[k]);
      repeat ($urandom_range(0, 40)) c.push_back($urandom_range(0, 1));
      cur.delete(); dropped = 0;
      foreach (c[i]) put('{valid: 1'b1, b: c[i], flag: 1'b0, abort: 1'b0, drop: 1'b0});
      put('{valid: 1'b0, b: 1'b0, flag: 1'b1, abort: 1'b0, drop: 1'b0});
      @(negedge clk);
      checks++;
      if (!rxad || match) begin
        passes++;
        if (cur != c || dropped) begin failures++; $display("frame %0d should pass", f); end
      end else begin
        drops++;
        if (cur != c[0:6] || !dropped) begin failures++; $display("frame %0d should drop", f); end
      end
    end
    checks++;
    if (drops == 0 || passes == 0) begin failures++; $display("cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
