// tb_synapse_layer: loads random weights into a 42->7 synapse layer, drives
// random spike vectors and checks every current after every tick against
// an integer model of i <- i - floor(i/16) + sum(w * 64) over the spiking
// inputs. Also checks that the currents hold between ticks and that reset
// clears them.
module tb_synapse_layer;
  import izh_pkg::*;

  localparam int NP = 42, NQ = 7;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, w_we = 1'b0;
  logic [NP-1:0] pre_spike;
  logic [8:0]    w_addr;
  logic signed [15:0] w_data;
  fix_t i_syn [NQ];
  int   checks = 0, failures = 0;
  int   wm [NQ][NP];
  longint im [NQ];

  synapse_layer #(.N_PRE(NP), .N_POST(NQ)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .pre_spike(pre_spike),
    .w_we(w_we), .w_addr(w_addr), .w_data(w_data), .i_syn(i_syn));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv16(input longint a);
    return (a >= 0) ? a / 16 : -((-a + 15) / 16);
  endfunction

  initial begin
    pre_spike = '0; w_addr = '0; w_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NQ; j++) begin
      im[j] = 0;
      checks++;
      if (i_syn[j] != 0) failures++;
    end
    for (int j = 0; j < NQ; j++)
      for (int i = 0; i < NP; i++) begin
        wm[j][i] = int'($urandom_range(4000)) - 2000;
        @(negedge clk);
        w_we = 1'b1; w_addr = 9'(j*NP + i); w_data = 16'(wm[j][i]);
      end
    @(negedge clk) w_we = 1'b0;
    for (int t = 0; t < 300; t++) begin
      pre_spike = {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 50 == 49) pre_spike = '0;      // let currents decay
      @(negedge clk);                        // no tick: currents hold
      for (int j = 0; j < NQ; j++) begin
        checks++;
        if (longint'(i_syn[j]) != im[j]) failures++;
      end
      tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      for (int j = 0; j < NQ; j++) begin
        longint s;
        s = 0;
        for (int i = 0; i < NP; i++) if (pre_spike[i]) s += longint'(wm[j][i]) * 64;
        im[j] = im[j] - floordiv16(im[j]) + s;
        checks++;
        if (longint'(i_syn[j]) != im[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d j=%0d got %0d want %0d", t, j, i_syn[j], im[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
