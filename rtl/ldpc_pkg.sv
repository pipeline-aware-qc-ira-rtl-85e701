// ldpc_pkg: code definition and shared constants of the pipeline-aware
// QC-IRA-LDPC layered decoder.
//
// The code is a rate-1/2 (2016,1008) quasi-cyclic irregular repeat-accumulate
// LDPC code with circulant size Q = 84: 12 block rows (layers) and 24 block
// columns, of which columns 0..11 carry information bits and 12..23 parity
// bits. Every layer holds exactly seven nonzero circulants, matching the seven
// switch networks of the decoder datapath.
//
// The parity part is the dual-diagonal accumulator (without tail-biting) whose
// block rows have been reordered even-rows-first, odd-rows-second, so that
// layer r < 6 is original row 2r and layer r >= 6 is original row 2(r-6)+1.
// The information part was drawn with the pipeline-aware construction
// procedure: a circulant may be placed in layer l only if layers l-1 and l+1
// (cyclically, because the last layer of one iteration is followed by the
// first of the next) have nothing in that column, each column uses distinct
// shift values, and no length-4 cycle exists. The particular shift values
// below are this design's own draw of that procedure (seeded random), not
// values published with the code.
//
// A circulant with shift s connects row r of the layer to variable (r+s) mod Q
// of the block column.
//
// The decoder stores the LLRs of a block column in the rotation of the last
// layer that updated them (differential shifting). The tables DELTA_FIRST and
// DELTA_STEADY give the rotation the switch network must apply when a layer
// reads a column in the first iteration (stored order still natural) and in
// later iterations; FINAL_SHIFT gives the rotation a column is left in after
// the last layer, used to return the decoded word to natural order.
package ldpc_pkg;

  localparam int Q      = 84;   // circulant size
  localparam int LAYERS = 12;   // block rows
  localparam int NCOL   = 24;   // block columns
  localparam int KCOL   = 12;   // information block columns
  localparam int DEG    = 7;    // nonzero circulants per layer (row weight)
  localparam int W      = 6;    // channel LLR and check message width, two's complement
  localparam int PW     = 8;    // a-posteriori LLR width
  localparam int ITER   = 10;   // decoding iterations
  localparam int N      = NCOL * Q;  // code length 2016
  localparam int K      = KCOL * Q;  // information length 1008
  localparam int SHW    = 7;    // width of a shift value, $clog2(Q)
  localparam int COLW   = 5;    // width of a block column index
  localparam int LAYW   = 4;    // width of a layer index

  typedef logic signed [PW-1:0] llr_t;     // a-posteriori LLR
  typedef logic signed [W-1:0]  msg_t;     // channel LLR, check-to-variable message
  typedef llr_t [Q-1:0]         blk_t;     // one block column of LLRs
  typedef msg_t [Q-1:0]         chan_blk_t; // one block column of channel LLRs
  typedef blk_t [DEG-1:0]       slots_t;   // LLRs of the seven block columns a layer touches
  typedef chan_blk_t [DEG-1:0]  rslots_t;  // check messages of one layer, [slot][row]
  typedef logic [SHW-1:0]      shift_t;
  typedef logic [COLW-1:0]     col_t;
  typedef logic [LAYW-1:0]     layer_t;

  typedef struct packed {
    col_t   col;
    shift_t shift;
  } hblk_t;

  typedef hblk_t  [0:LAYERS-1][0:DEG-1] base_t;
  typedef shift_t [0:LAYERS-1][0:DEG-1] dtab_t;
  typedef shift_t [0:NCOL-1]            ftab_t;

  // Base matrix: for each layer, the seven (block column, shift) pairs.
  localparam base_t BASE = '{
      '{'{5'd1, 7'd53}, '{5'd3, 7'd60}, '{5'd5, 7'd63}, '{5'd7, 7'd10}, '{5'd8, 7'd14}, '{5'd11, 7'd32}, '{5'd12, 7'd0}},
      '{'{5'd0, 7'd13}, '{5'd2, 7'd6}, '{5'd4, 7'd19}, '{5'd6, 7'd33}, '{5'd9, 7'd63}, '{5'd13, 7'd0}, '{5'd14, 7'd0}},
      '{'{5'd1, 7'd37}, '{5'd3, 7'd82}, '{5'd8, 7'd78}, '{5'd10, 7'd21}, '{5'd11, 7'd30}, '{5'd15, 7'd0}, '{5'd16, 7'd0}},
      '{'{5'd2, 7'd78}, '{5'd4, 7'd6}, '{5'd5, 7'd39}, '{5'd7, 7'd1}, '{5'd9, 7'd58}, '{5'd17, 7'd0}, '{5'd18, 7'd0}},
      '{'{5'd1, 7'd29}, '{5'd3, 7'd64}, '{5'd6, 7'd32}, '{5'd8, 7'd48}, '{5'd11, 7'd14}, '{5'd19, 7'd0}, '{5'd20, 7'd0}},
      '{'{5'd0, 7'd78}, '{5'd2, 7'd23}, '{5'd4, 7'd51}, '{5'd5, 7'd11}, '{5'd7, 7'd12}, '{5'd21, 7'd0}, '{5'd22, 7'd0}},
      '{'{5'd1, 7'd4}, '{5'd6, 7'd66}, '{5'd8, 7'd16}, '{5'd9, 7'd57}, '{5'd10, 7'd9}, '{5'd12, 7'd0}, '{5'd13, 7'd0}},
      '{'{5'd0, 7'd30}, '{5'd4, 7'd76}, '{5'd5, 7'd41}, '{5'd7, 7'd31}, '{5'd11, 7'd11}, '{5'd14, 7'd0}, '{5'd15, 7'd0}},
      '{'{5'd1, 7'd27}, '{5'd2, 7'd79}, '{5'd3, 7'd16}, '{5'd8, 7'd77}, '{5'd9, 7'd62}, '{5'd16, 7'd0}, '{5'd17, 7'd0}},
      '{'{5'd0, 7'd23}, '{5'd4, 7'd32}, '{5'd6, 7'd64}, '{5'd10, 7'd6}, '{5'd11, 7'd13}, '{5'd18, 7'd0}, '{5'd19, 7'd0}},
      '{'{5'd1, 7'd72}, '{5'd5, 7'd60}, '{5'd7, 7'd55}, '{5'd8, 7'd51}, '{5'd9, 7'd30}, '{5'd20, 7'd0}, '{5'd21, 7'd0}},
      '{'{5'd0, 7'd19}, '{5'd2, 7'd74}, '{5'd4, 7'd40}, '{5'd6, 7'd77}, '{5'd10, 7'd54}, '{5'd22, 7'd0}, '{5'd23, 7'd0}}
  };

  // Rotation applied by the switch network to slot s of layer l.
  // first = 1: first iteration, a column not yet touched this frame is still
  // in natural order (rotation 0).
  function automatic dtab_t calc_delta(bit first);
    dtab_t t;
    for (int l = 0; l < LAYERS; l++) begin
      for (int s = 0; s < DEG; s++) begin
        int c, sh, prev_sh;
        bit found;
        c  = int'(BASE[l][s].col);
        sh = int'(BASE[l][s].shift);
        found   = 1'b0;
        prev_sh = 0;
        for (int k = 1; k <= LAYERS; k++) begin
          int lp;
          if (!found && !(first && (l - k) < 0)) begin
            lp = (l - k + LAYERS) % LAYERS;
            for (int u = 0; u < DEG; u++) begin
              if (!found && int'(BASE[lp][u].col) == c) begin
                found   = 1'b1;
                prev_sh = int'(BASE[lp][u].shift);
              end
            end
          end
        end
        t[l][s] = shift_t'((sh - prev_sh + Q) % Q);
      end
    end
    return t;
  endfunction

  // Rotation a column is left in after the last layer of an iteration.
  function automatic ftab_t calc_final();
    ftab_t t;
    for (int c = 0; c < NCOL; c++) begin
      t[c] = '0;
      for (int l = 0; l < LAYERS; l++)
        for (int s = 0; s < DEG; s++)
          if (int'(BASE[l][s].col) == c) t[c] = BASE[l][s].shift;
    end
    return t;
  endfunction

  localparam dtab_t DELTA_FIRST  = calc_delta(1'b1);
  localparam dtab_t DELTA_STEADY = calc_delta(1'b0);
  localparam ftab_t FINAL_SHIFT  = calc_final();


endpackage
