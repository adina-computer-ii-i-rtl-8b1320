// tb_common_mem: self-checking test of a submaster's common memory (N = 4).
// The SU fills part of the memory; it then opens the memory to AU 2 with
// the code '1' & 2, which must grant only AU 2 one clock later and stall
// the SU. AU 2 reads the SU's data and writes results; other AUs' requests
// must not land. AU 2's end signal reaches the SU. After the SU closes the
// memory it reads the AU's results. Read data come one cycle after a read.
module tb_common_mem;
  import adina_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n;
  logic [2:0] su_sel;
  cm_req_t   su_req;
  logic      su_ready, su_done;
  cm_req_t   au_req [N];
  logic      au_end [N], au_grant [N];
  word_t     rdata;
  int checks = 0, failures = 0;

  common_mem #(.N(N)) dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clear();
    su_req = '0;
    for (int n = 0; n < N; n++) au_req[n] = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; su_sel = 0; clear();
    for (int n = 0; n < N; n++) au_end[n] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check("SU owns after reset", su_ready, 1);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      su_req = '{en: 1, we: 1, addr: 13'(a * 7), wdata: 16'(16'h5000 + a)};
    end
    @(negedge clk);
    clear();
    su_sel = 3'b110;   // '1' and AU 2
    #1 check("SU stalls at once", su_ready, 0);
    for (int n = 0; n < N; n++) check("no grant yet", au_grant[n], 0);
    @(negedge clk);
    for (int n = 0; n < N; n++) check($sformatf("grant %0d", n), au_grant[n], n == 2);
    // AU 2 reads the SU's data
    for (int a = 0; a < 32; a++) begin
      au_req[2] = '{en: 1, we: 0, addr: 13'(a * 7), wdata: 0};
      au_req[1] = '{en: 1, we: 1, addr: 13'(a * 7), wdata: 16'hBAD1};
      @(negedge clk);
      clear();
      check($sformatf("AU reads %0d", a), rdata, 16'(16'h5000 + a));
    end
    // AU 2 writes results
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      au_req[2] = '{en: 1, we: 1, addr: 13'(8000 + a), wdata: 16'(16'hA200 + a)};
      su_req    = '{en: 1, we: 1, addr: 13'(8000 + a), wdata: 16'hBAD5};
    end
    @(negedge clk);
    clear();
    check("no end yet", su_done, 0);
    au_end[2] = 1;
    #1 check("end reaches SU", su_done, 1);
    au_end[3] = 1;
    @(negedge clk);
    au_end[2] = 0;
    #1 check("other AU's end ignored", su_done, 0);
    su_sel = 3'b000;
    @(negedge clk);
    au_end[3] = 0;
    for (int n = 0; n < N; n++) check("grant released", au_grant[n], 0);
    check("SU owns again", su_ready, 1);
    for (int a = 0; a < 16; a++) begin
      su_req = '{en: 1, we: 0, addr: 13'(8000 + a), wdata: 0};
      @(negedge clk);
      clear();
      check($sformatf("SU reads result %0d", a), rdata, 16'(16'hA200 + a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
