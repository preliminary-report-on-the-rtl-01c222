// tb_nc_memory: self-checking test of the 64K x 16 main memory.
//
// Writes random words at random addresses at the clock edge and checks that
// the asynchronous read returns the last word written to each address (or
// zero for an address never written), including a read of the address being
// written in the same cycle, which must still show the old word.
module tb_nc_memory;
  localparam int unsigned DEPTH = 65536;
  logic        clk = 0;
  logic [15:0]  addr;
  logic [15:0] wdata, rdata;
  logic        we;
  int checks = 0, failures = 0;
  logic [15:0] model [int];

  always #5 clk = ~clk;

  nc_memory #(.W(16), .DEPTH(DEPTH)) dut (.clk, .addr, .wdata, .we, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    we = 0; addr = 0; wdata = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      addr  = 16'($urandom_range(0, (k < 2000) ? 63 : DEPTH - 1));
      wdata = 16'($urandom);
      we    = 1'($urandom);
      #1;
      exp = model.exists(int'(addr)) ? model[int'(addr)] : 16'd0;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %h: got %h expected %h", addr, rdata, exp);
      end
      if (we) model[int'(addr)] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (model[a]) begin
      addr = 16'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL final read %h: got %h expected %h", addr, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
