`timescale 1ns / 1ps
// tb_bin2rns: exhaustive test of the binary to RNS converter.
// Every FCW value 0 .. 2^FCW_W-1 is applied, one per clock. Just before the
// next edge the output must still show the previous word's residues
// (latency 1); just after it each channel must equal fcw mod m_i, computed
// here with the % operator. The reset value is checked too.
module tb_bin2rns;
  import rns_pkg::*;

  logic                        clk = 1'b0;
  logic                        rst_n;
  logic [FCW_W-1:0]            fcw;
  logic [N_CH-1:0][RES_W-1:0]  rns_out;
  int unsigned checks = 0, failures = 0;

  bin2rns dut (.clk, .rst_n, .fcw, .rns_out);

  always #5 clk = ~clk;

  initial begin
    #(10 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FCW_W-1:0] prev;
    rst_n = 1'b0;
    fcw   = '1;
    @(posedge clk); #1;
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (rns_out[c] !== '0) begin failures++; $display("reset value ch%0d = %0d", c, rns_out[c]); end
    end
    rst_n = 1'b1;
    fcw   = '0;
    for (int unsigned v = 0; v < (1 << FCW_W); v++) begin
      prev = fcw;
      fcw  = FCW_W'(v);
      #2;
      // latency: before the edge the output still shows the previous word
      if (v > 0) begin
        for (int c = 0; c < N_CH; c++) begin
          checks++;
          if (rns_out[c] != RES_W'(int'(prev) % int'(MODULI[c]))) begin
            failures++;
            if (failures < 10) $display("early change fcw=%0d ch%0d", v, c);
          end
        end
      end
      @(posedge clk); #1;
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (rns_out[c] != RES_W'(int'(fcw) % int'(MODULI[c]))) begin
          failures++;
          if (failures < 10) $display("fcw=%0d ch%0d: got %0d want %0d", fcw, c, rns_out[c],
                                      int'(fcw) % int'(MODULI[c]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
