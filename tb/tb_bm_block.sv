// tb_bm_block: self-checking test of one buffer memory block.
// Fills the 256 halfwords with a pattern through the active-low controls,
// reads them back one cycle after each read, checks that OD_n blanks the
// output, that a deselected block (CS_n high) neither writes nor reads, and
// that a read shows its data after exactly one clock edge.
module tb_bm_block;
  import adina_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       cs_n, od_n, rw_n;
  logic [7:0] addr;
  word_t      din, dout;
  int checks = 0, failures = 0;
  word_t model [256];

  bm_block dut (.*);

  function automatic word_t pat(int a, int s);
    return word_t'((a * 16'h9E37) ^ (s * 16'h3C5A) ^ 16'h1234);
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_n = 1; od_n = 1; rw_n = 1; addr = 0; din = 0;
    // fill
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      cs_n = 0; rw_n = 0; addr = 8'(a); din = pat(a, 0); model[a] = din;
    end
    // a deselected write must not land
    @(negedge clk);
    cs_n = 1; rw_n = 0; addr = 8'd77; din = 16'hDEAD;
    // read back in random order
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(255);
      @(negedge clk);
      cs_n = 0; rw_n = 1; od_n = 0; addr = 8'(a);
      @(negedge clk);
      cs_n = 1;
      check($sformatf("read %0d", a), dout, model[a]);
      od_n = 1;
      #1 check("OD_n blanks output", dout, '0);
      od_n = 0;
    end
    // read latency: data of the new address only after the edge
    @(negedge clk);
    cs_n = 0; rw_n = 1; addr = 8'd3;
    @(negedge clk);
    cs_n = 0; rw_n = 1; addr = 8'd200;
    #1 check("before edge: old read", dout, model[3]);
    @(negedge clk);
    cs_n = 1;
    check("after edge: new read", dout, model[200]);
    // deselected read keeps the output
    addr = 8'd9;
    @(negedge clk);
    check("CS_n high holds data", dout, model[200]);
    // overwrite half, check all
    for (int a = 0; a < 256; a += 2) begin
      @(negedge clk);
      cs_n = 0; rw_n = 0; addr = 8'(a); din = pat(a, 1); model[a] = din;
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      cs_n = 0; rw_n = 1; addr = 8'(a);
      @(negedge clk);
      cs_n = 1;
      check($sformatf("reread %0d", a), dout, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
