// wugs_se: one plane of the eight-port shared-buffer switch element.
// Four of these, fed with the same address bits and different data bytes,
// make one switch element; they act identically, so a cell crosses the four
// planes in lock-step without any coordination between them.
//
// Data path (left to right): each 12-bit input (4 address + 8 data bits)
// passes a skew compensator (wugs_skuc) that aligns it to the core's input
// phase, MAX_SKEW ticks behind the global tick. At the first word of an input
// cell cycle the input crossbar gives every busy cell (BI set) a free row of
// the central cell buffer (CBUF, SLOTS rows of 16 words); the rows are filled
// in parallel. Each row has a buffer control circuit (BCC) that records the
// routing fields, the cell's waiting time (age, in cell cycles) and the set
// of outputs it still has to reach. Once the whole cell is stored, the BCC
// raises its output-select lines: a base-8 digit of the address (chosen by
// cfg_digit) for unicast, both digits for copy-by-two, the digit range for
// copy-range, or the output picked by the distribution circuit (wugs_dstc)
// when cfg_dist is set. At tick 15 of every cell cycle each output-crossbar
// column whose downstream neighbour grants (dg) picks the oldest requesting
// row (wugs_oxbar_arb); the chosen rows are read out during the next cell
// cycle, through the header modification circuit (wugs_hmc), to registered
// outputs. A row serves several outputs in parallel and keeps contending
// for those it has not yet won; it is freed after its last copy has left.
// The grant generator (wugs_ggc) offers upstream grants ug for as many
// inputs as there are free rows.
//
// Timing: tick counts 0..15 and is common to all chips. ug is valid from
// tick 15 on and is sampled by the sender at tick 15; a granted sender
// starts its cell at tick 0 of the next cycle. dg is sampled at tick 15.
// Outputs are registered, so a link adds one tick of skew. Minimum latency
// through the element is two cell cycles plus the input lag.
// Sizes follow the published chip: 8 ports, 40 cell slots, 12-bit paths.
// The plane's parity pin is not modelled.
module wugs_se
  import wugs_pkg::*;
#(
  parameter int N        = 8,
  parameter int SLOTS    = 40,
  parameter int AGE_W    = 8,
  parameter int MAX_SKEW = 2
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [3:0]                                tick,
  input  logic [1:0]                                cfg_digit, // base-8 digit routed on
  input  logic                                      cfg_dist,  // load-distribution stage
  input  logic [N-1:0][$clog2(MAX_SKEW+1)-1:0]      cfg_skew,  // per-input link delay
  input  logic [N-1:0][PLANE_W-1:0]                 ud,        // upstream data
  output logic [N-1:0]                              ug,        // upstream grants
  output logic [N-1:0][PLANE_W-1:0]                 dd,        // downstream data
  input  logic [N-1:0]                              dg,        // downstream grants
  output logic [15:0]                               drop_cnt   // cells lost for lack of a slot
);
  localparam int SW = $clog2(SLOTS);
  localparam int LW = $clog2(N);

  // ---------------- input side ----------------
  logic [3:0]                 rtick;
  logic [N-1:0][PLANE_W-1:0]  a;        // aligned inputs
  logic [N-1:0]               busy;
  logic [N-1:0][LW-1:0]       dsel;

  assign rtick = 4'(tick - 4'(MAX_SKEW));

  for (genvar i = 0; i < N; i++) begin : g_skuc
    wugs_skuc #(.W(PLANE_W), .MAX_SKEW(MAX_SKEW)) u_skuc (
      .clk(clk), .skew(cfg_skew[i]), .din(ud[i]), .dout(a[i]));
    assign busy[i] = a[i][11];   // BI bit of word 0
  end

  wugs_dstc #(.N(N)) u_dstc (
    .clk(clk), .rst_n(rst_n), .first(rtick == 4'd0), .en(cfg_dist),
    .busy(busy), .sel(dsel));

  // BCC state
  logic [SLOTS-1:0]             row_busy, row_ready, row_dist;
  logic [SLOTS-1:0][N-1:0]      pend;
  logic [SLOTS-1:0][AGE_W-1:0]  age;
  logic [SLOTS-1:0][2:0]        row_rc;
  logic [SLOTS-1:0][ADR_W-1:0]  row_a1, row_a2;
  logic [SLOTS-1:0][LW-1:0]     row_dsel;
  pword_t                       cbuf [SLOTS][TICKS];

  // input crossbar: slot allocation at the first word
  logic [N-1:0]          alloc_v;
  logic [N-1:0][SW-1:0]  alloc_slot;
  logic [N-1:0]          map_v;
  logic [N-1:0][SW-1:0]  map_slot;

  always_comb begin
    logic [SLOTS-1:0] taken;
    taken = row_busy;
    alloc_v = '0;
    alloc_slot = '0;
    for (int i = 0; i < N; i++) begin
      if (busy[i]) begin
        for (int s = SLOTS-1; s >= 0; s--)
          if (!taken[s]) begin
            alloc_v[i] = 1'b1;
            alloc_slot[i] = SW'(s);
          end
        if (alloc_v[i]) taken[alloc_slot[i]] = 1'b1;
      end
    end
  end

  // write path: one word per tick into the row owned by each input
  logic [N-1:0]          wr_v;
  logic [N-1:0][SW-1:0]  wr_slot;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      wr_v[i]    = (rtick == 4'd0) ? alloc_v[i]    : map_v[i];
      wr_slot[i] = (rtick == 4'd0) ? alloc_slot[i] : map_slot[i];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (wr_v[i]) cbuf[wr_slot[i]][rtick] <= a[i];
  end

  // ---------------- output crossbar ----------------
  logic [N-1:0]          gnt_v;
  logic [N-1:0][SW-1:0]  gnt_idx;
  logic [N-1:0]          sel_v;
  logic [N-1:0][SW-1:0]  sel_row;
  logic [SLOTS-1:0][N-1:0] won;

  for (genvar j = 0; j < N; j++) begin : g_col
    logic [SLOTS-1:0] req;
    for (genvar s = 0; s < SLOTS; s++) begin : g_req
      assign req[s] = row_ready[s] & pend[s][j] & dg[j];
    end
    wugs_oxbar_arb #(.N(SLOTS), .AGE_W(AGE_W)) u_arb (
      .req(req), .age(age), .gnt_v(gnt_v[j]), .gnt_idx(gnt_idx[j]));
  end

  always_comb begin
    won = '0;
    for (int j = 0; j < N; j++)
      if (gnt_v[j]) won[gnt_idx[j]][j] = 1'b1;
  end

  // ---------------- BCC / IXBAR control ----------------
  logic [6:0] free_cnt;
  always_comb begin
    free_cnt = '0;
    for (int s = 0; s < SLOTS; s++) free_cnt = free_cnt + 7'(!row_busy[s]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_busy  <= '0;
      row_ready <= '0;
      row_dist  <= '0;
      pend      <= '0;
      age       <= '0;
      row_rc    <= '0;
      row_a1    <= '0;
      row_a2    <= '0;
      row_dsel  <= '0;
      map_v     <= '0;
      map_slot  <= '0;
      sel_v     <= '0;
      sel_row   <= '0;
      drop_cnt  <= '0;
    end else begin
      // arrivals
      if (rtick == 4'd0) begin
        map_v    <= alloc_v;
        map_slot <= alloc_slot;
        for (int i = 0; i < N; i++) begin
          if (alloc_v[i]) begin
            row_busy[alloc_slot[i]] <= 1'b1;
            row_rc[alloc_slot[i]]   <= a[i][10:8];
            row_dist[alloc_slot[i]] <= cfg_dist;
            row_dsel[alloc_slot[i]] <= dsel[i];
            age[alloc_slot[i]]      <= '0;
          end
          if (busy[i] && !alloc_v[i]) drop_cnt <= drop_cnt + 1'b1;
        end
      end
      for (int i = 0; i < N; i++) begin
        if (map_v[i]) begin
          unique case (rtick)
            4'd1: row_a1[map_slot[i]][11:9] <= a[i][10:8];
            4'd2: row_a1[map_slot[i]][8:6]  <= a[i][10:8];
            4'd3: row_a1[map_slot[i]][5:3]  <= a[i][10:8];
            4'd4: row_a1[map_slot[i]][2:0]  <= a[i][10:8];
            4'd5: row_a2[map_slot[i]][11:9] <= a[i][10:8];
            4'd6: row_a2[map_slot[i]][8:6]  <= a[i][10:8];
            4'd7: row_a2[map_slot[i]][5:3]  <= a[i][10:8];
            4'd8: row_a2[map_slot[i]][2:0]  <= a[i][10:8];
            default: ;
          endcase
          if (rtick == 4'd15) begin
            row_ready[map_slot[i]] <= 1'b1;
            pend[map_slot[i]] <= row_dist[map_slot[i]]
                ? N'(1) << row_dsel[map_slot[i]]
                : route_mask(row_rc[map_slot[i]], row_a1[map_slot[i]],
                             row_a2[map_slot[i]], cfg_digit);
          end
        end
      end
      if (rtick == 4'd15) map_v <= '0;

      // output contention, once per cell cycle
      if (tick == 4'd15) begin
        for (int j = 0; j < N; j++) begin
          sel_v[j]   <= gnt_v[j];
          sel_row[j] <= gnt_idx[j];
        end
        for (int s = 0; s < SLOTS; s++) begin
          if (row_ready[s]) begin
            if (pend[s] == '0) begin
              row_busy[s]  <= 1'b0;
              row_ready[s] <= 1'b0;
            end else begin
              pend[s] <= pend[s] & ~won[s];
              if (age[s] != '1) age[s] <= age[s] + 1'b1;
            end
          end
        end
      end
    end
  end

  // ---------------- output side: HMC and output registers ----------------
  for (genvar j = 0; j < N; j++) begin : g_out
    pword_t raw, mod;
    assign raw = sel_v[j] ? cbuf[sel_row[j]][tick] : '0;
    wugs_hmc u_hmc (
      .port(3'(j)), .digit(cfg_digit), .dmode(row_dist[sel_row[j]]),
      .rc(row_rc[sel_row[j]]), .adr1(row_a1[sel_row[j]]), .adr2(row_a2[sel_row[j]]),
      .w(tick), .din(raw), .dout(mod));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) dd[j] <= '0;
      else        dd[j] <= mod;
  end

  wugs_ggc #(.N(N), .CNT_W(7)) u_ggc (
    .clk(clk), .rst_n(rst_n), .upd(tick == 4'd14), .free_cnt(free_cnt), .ug(ug));

endmodule
