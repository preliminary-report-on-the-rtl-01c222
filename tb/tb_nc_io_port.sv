// tb_nc_io_port: self-checking test of the I/O port, at the B port width (16)
// and the X port width (5).
//
// Checks that input reads return pin XOR compare, that DATA writes leave
// masked bits unchanged, that DIR selects driven bits, that TRI bits are
// driven only in the cycle after a DATA write, and that the mode registers
// read back. Expected values are kept in a model in the testbench.
module tb_nc_io_port;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [2:0]  addr;
  logic        we;
  logic [15:0] wdata, rdata, pin_in, pin_out, pin_oe, latch;
  logic [4:0]  xwdata, xrdata, xpin_in, xpin_out, xpin_oe, xlatch;

  nc_io_port #(.W(16)) bport (.clk, .rst_n, .addr, .we, .wdata, .rdata, .pin_in, .pin_out,
                              .pin_oe, .latch);
  nc_io_port #(.W(5)) xport (.clk, .rst_n, .addr, .we, .wdata(xwdata), .rdata(xrdata),
                             .pin_in(xpin_in), .pin_out(xpin_out), .pin_oe(xpin_oe),
                             .latch(xlatch));
  assign xwdata = wdata[4:0];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk);
    addr = a; wdata = d; we = 1;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m_latch, m_dir, m_tri, m_cmp, m_mask, d;
    int sel;
    addr = 0; we = 0; wdata = 0; pin_in = 0; xpin_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_latch = 0; m_dir = 0; m_tri = 0; m_cmp = 0; m_mask = 0;
    @(negedge clk);
    check("reset oe", pin_oe, 0);
    for (int k = 0; k < 500; k++) begin
      sel = int'($urandom_range(0, 4));
      unique case (sel)
        0: begin d = 16'($urandom); wr(3'd1, d); m_dir = d; end
        1: begin d = 16'($urandom); wr(3'd2, d); m_tri = d; end
        2: begin d = 16'($urandom); wr(3'd3, d); m_cmp = d; end
        3: begin d = 16'($urandom); wr(3'd4, d); m_mask = d; end
        default: begin
          d = 16'($urandom);
          @(negedge clk);
          addr = 3'd0; wdata = d; we = 1;
          @(negedge clk);
          we = 0;
          m_latch = (m_latch & m_mask) | (d & ~m_mask);
          // cycle right after the write: tri-state outputs driven
          check("oe after write", pin_oe, m_dir);
          check("x oe after write", 32'(xpin_oe), 32'(m_dir[4:0]));
          check("latch", pin_out, m_latch);
          check("x latch", 32'(xpin_out), 32'(m_latch[4:0] & ~m_mask[4:0] | xlatch & m_mask[4:0]));
        end
      endcase
      @(negedge clk);
      check("oe idle", pin_oe, m_dir & ~m_tri);
      pin_in = 16'($urandom);
      xpin_in = 5'($urandom);
      addr = 3'd0; #1;
      check("input xor", rdata, pin_in ^ m_cmp);
      check("x input xor", 32'(xrdata), 32'(xpin_in ^ m_cmp[4:0]));
      addr = 3'd1; #1; check("dir rd", rdata, m_dir);
      addr = 3'd2; #1; check("tri rd", rdata, m_tri);
      addr = 3'd3; #1; check("cmp rd", rdata, m_cmp);
      addr = 3'd4; #1; check("mask rd", rdata, m_mask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
