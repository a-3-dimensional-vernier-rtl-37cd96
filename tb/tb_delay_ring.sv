// Test of the delay-ring model. Open ring: an input edge reaches stage k at
// T_SW + k*T_STAGE. Closed ring (sw high after the edge has passed stage 3):
// the last stage toggles once per lap of N*T_STAGE + T_SW, rising on odd laps
// and falling on even laps. Opened again, the ring comes to rest at the input
// level.
`timescale 1ps/100fs
module tb_delay_ring;

  localparam int      N   = 12;
  localparam realtime T   = 165.0;
  localparam realtime TSW = 49.5;
  localparam realtime LAP = N * T + TSW;

  logic in_p, in_m, sw;
  logic [N:1] stage_p, stage_m;

  delay_ring #(.N_STAGES(N), .T_STAGE(T), .T_SW(TSW)) dut (.*);
  assign in_m = ~in_p;

  int checks = 0, failures = 0;
  realtime t0, t_edge[$];

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(stage_p[N]) t_edge.push_back($realtime);

  initial begin
    in_p = 0; sw = 0;
    #(2 * LAP);
    t_edge.delete();
    // Open ring: arrival time at every stage.
    t0 = $realtime;
    in_p = 1;
    fork
      for (int k = 1; k <= N; k++) begin
        automatic int kk = k;
        fork
          begin
            #(TSW + kk * T - 0.5);
            checks++;
            if (stage_p[kk] !== 1'b0) begin failures++; $display("FAIL stage %0d early", kk); end
            #1.0;
            checks++;
            if (stage_p[kk] !== 1'b1 || stage_m[kk] !== 1'b0) begin failures++; $display("FAIL stage %0d late", kk); end
          end
        join_none
      end
    join
    #(TSW + 3 * T + 1.0);
    sw = 1; in_p = 0;               // close the ring, clear the input
    #(6 * LAP);
    // Edges at the last stage: first arrival, then one per lap.
    checks++;
    if (t_edge.size() < 6) begin
      failures++; $display("FAIL only %0d edges", t_edge.size());
    end else begin
      for (int n = 1; n < 6; n++) begin
        checks++;
        if (t_edge[n] - t_edge[n-1] < LAP - 0.1 || t_edge[n] - t_edge[n-1] > LAP + 0.1) begin
          failures++; $display("FAIL lap %0d took %0.1f", n, t_edge[n] - t_edge[n-1]);
        end
      end
    end
    // Break the ring right after an even lap ended (last stage low again).
    wait (stage_p[N] == 1'b0);
    #1 sw = 0;
    #(3 * LAP);
    checks++;
    if (stage_p !== '0 || stage_m !== '1) begin failures++; $display("FAIL not at rest %b", stage_p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
