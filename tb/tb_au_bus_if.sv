// tb_au_bus_if: self-checking test of an AU's shared-memory window.
// Stub targets in the bench answer each bus with data naming the bus and
// the address. Checks the address map (common memory, row bus, column bus,
// private half unclaimed), block and word fields, broadcast bits, that
// ready follows the target's open/grant, that a waiting access issues
// nothing, and that read data return with rvalid one cycle later from the
// right target.
module tb_au_bus_if;
  import adina_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n, req, we, row_bcast, col_bcast;
  logic [15:0] addr;
  word_t   wdata, rdata, row_rdata, col_rdata, cm_rdata;
  logic    sel, ready, rvalid, row_open, col_open, cm_grant;
  bm_req_t row_req, col_req;
  cm_req_t cm_req;
  int checks = 0, failures = 0;
  int waits = 0;

  au_bus_if dut (.*);

  // stub targets: registered read data
  always_ff @(posedge clk) begin
    row_rdata <= row_req.en ? 16'h1000 | {row_req.blk[3:0], row_req.addr} : '0;
    col_rdata <= col_req.en ? 16'h2000 | {col_req.blk[3:0], col_req.addr} : '0;
    cm_rdata  <= cm_req.en  ? 16'h4000 ^ {3'b0, cm_req.addr}  : '0;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
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
    rst_n = 0; req = 0; we = 0; addr = 0; wdata = 0;
    row_bcast = 0; col_bcast = 0; row_open = 1; col_open = 1; cm_grant = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [15:0] a;
      logic [31:0] exp;
      logic        w, rb, cb;
      a  = 16'($urandom) & 16'hFFFE;
      w  = 1'($urandom);
      rb = 1'($urandom);
      cb = 1'($urandom);
      @(negedge clk);
      req = 1; we = w; addr = a; wdata = 16'(n); row_bcast = rb; col_bcast = cb;
      row_open = 1'($urandom); col_open = 1'($urandom); cm_grant = 1'($urandom);
      #1;
      check("sel", sel, a[15]);
      if (a[15]) begin
        // wait while the target is closed
        while (!(a[14] ? (a[13] ? col_open : row_open) : cm_grant)) begin
          check("ready low while closed", ready, 0);
          check("nothing issued", row_req.en | col_req.en | cm_req.en, 0);
          waits++;
          @(negedge clk);
          row_open = 1; col_open = 1; cm_grant = 1;
          #1;
        end
        check("ready", ready, 1);
        check("row en", row_req.en, a[15:13] == 3'b110);
        check("col en", col_req.en, a[15:13] == 3'b111);
        check("cm en",  cm_req.en,  a[15:14] == 2'b10);
        if (a[15:13] == 3'b110)
          check("row fields", {row_req.we, row_req.bcast, row_req.blk, row_req.addr, row_req.wdata},
                {w, rb, 8'(a[12:9]), a[8:1], 16'(n)});
        if (a[15:13] == 3'b111)
          check("col fields", {col_req.we, col_req.bcast, col_req.blk, col_req.addr, col_req.wdata},
                {w, cb, 8'(a[12:9]), a[8:1], 16'(n)});
        if (a[15:14] == 2'b10)
          check("cm fields", {cm_req.we, cm_req.addr, cm_req.wdata}, {w, a[13:1], 16'(n)});
        @(negedge clk);
        req = 0;
        check("rvalid", rvalid, !w);
        if (!w) begin
          if (a[14] == 0)       exp = 32'(16'h4000 ^ {3'b0, a[13:1]});
          else if (a[13] == 0)  exp = 32'(16'h1000 | {a[12:9], a[8:1]});
          else                  exp = 32'(16'h2000 | {a[12:9], a[8:1]});
          check("rdata", rdata, exp);
        end
      end else begin
        check("private half: nothing issued", row_req.en | col_req.en | cm_req.en, 0);
        @(negedge clk);
        req = 0;
        check("private half: no rvalid", rvalid, 0);
      end
    end
    check("some accesses waited", waits > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
