// kf_dma: DMA engine between the external memory and the on-chip RAMs.
//
// Load (start_load): the first stage of a frame. If load_tracks is set it
// reads n_trk track records of TRK_WORDS words from trk_base and writes each
// one, packed into one wide word, to the track latch through its
// initial-value port; it then reads n_meas measurement records of MEAS_WORDS
// words from meas_base into the measurement RAM. Read requests are issued
// back to back as fast as the memory grants them, without waiting for data;
// returning words are packed in order.
// Store (start_store): the last step of a frame. It reads the n_trk updated
// track records from the latch and writes them word by word to res_base.
// done pulses for one clock when either operation has finished.
// The record layout is field f of a record at bits [f*W +: W] of the packed
// word and at address base + record*words + f outside.
//
// External memory port: a request (mem_req, mem_we, mem_addr, mem_wdata) is
// accepted in a clock where mem_gnt is high. Read data returns on mem_rvalid
// / mem_rdata, in request order, any number of clocks later; the DMA always
// accepts it. The article names the DMA and its role; the port, the record
// layout and the sequencing are this design's choices.
module kf_dma
  import kf_pkg::*;
#(
  parameter int INT_BITS   = KF_INT_BITS,
  parameter int FRAC_BITS  = KF_FRAC_BITS,
  parameter int MAX_TRACKS = 100,
  parameter int MAX_MEAS   = 100,
  parameter int ADDR_W     = 24,
  localparam int W    = INT_BITS + FRAC_BITS,
  localparam int TAW  = (MAX_TRACKS > 1) ? $clog2(MAX_TRACKS) : 1,
  localparam int MAW  = (MAX_MEAS > 1) ? $clog2(MAX_MEAS) : 1,
  localparam int TCW  = $clog2(MAX_TRACKS + 1),
  localparam int MCW  = $clog2(MAX_MEAS + 1),
  localparam int RW   = TRK_WORDS * W
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start_load,
  input  logic                start_store,
  input  logic                load_tracks,
  input  logic [TCW-1:0]      n_trk,
  input  logic [MCW-1:0]      n_meas,
  input  logic [ADDR_W-1:0]   trk_base,
  input  logic [ADDR_W-1:0]   meas_base,
  input  logic [ADDR_W-1:0]   res_base,
  output logic                busy,
  output logic                done,
  // external memory
  output logic                mem_req,
  output logic                mem_we,
  output logic [ADDR_W-1:0]   mem_addr,
  output logic [W-1:0]        mem_wdata,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  logic [W-1:0]        mem_rdata,
  // track latch: initial-value write port and read port
  output logic                trk_we,
  output logic [TAW-1:0]      trk_waddr,
  output logic [RW-1:0]       trk_wdata,
  output logic                trk_rd_en,
  output logic [TAW-1:0]      trk_raddr,
  input  logic [RW-1:0]       trk_rdata,
  // measurement RAM write port
  output logic                meas_we,
  output logic [MAW-1:0]      meas_waddr,
  output logic [MEAS_WORDS*W-1:0] meas_wdata
);

  typedef enum logic [2:0] {
    D_IDLE, D_LD_TRK, D_LD_MEAS, D_ST_RD, D_ST_WAIT, D_ST_WR, D_DONE
  } dstate_e;
  dstate_e state;

  localparam int CW = ADDR_W;   // word counters

  logic [CW-1:0] req_cnt, req_total;   // read requests issued / to issue
  logic [CW-1:0] rsp_cnt;              // read words received
  logic [3:0]    fld;                  // field index of the next word received
  logic [TCW-1:0] rec;                 // record being received / stored
  logic [RW-1:0] pack;                 // record being assembled / stored
  logic [3:0]    wfld;                 // field being written in store
  logic [ADDR_W-1:0] waddr;            // next external write address

  logic [ADDR_W-1:0] rd_base;
  logic              rd_phase;
  logic [3:0]        rec_words;

  always_comb begin
    rd_phase  = (state == D_LD_TRK) || (state == D_LD_MEAS);
    rd_base   = (state == D_LD_TRK) ? trk_base : meas_base;
    rec_words = (state == D_LD_TRK) ? 4'(TRK_WORDS) : 4'(MEAS_WORDS);
  end

  // External requests.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (rd_phase && req_cnt < req_total) begin
      mem_req  = 1'b1;
      mem_addr = rd_base + req_cnt;
    end else if (state == D_ST_WR) begin
      mem_req   = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = waddr;
      mem_wdata = pack[wfld*W +: W];
    end
  end

  assign busy       = (state != D_IDLE);
  assign trk_rd_en  = (state == D_ST_RD);
  assign trk_raddr  = TAW'(rec);

  logic [RW-1:0] pack_next;
  always_comb begin
    pack_next = pack;
    pack_next[fld*W +: W] = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      req_cnt    <= '0;
      req_total  <= '0;
      rsp_cnt    <= '0;
      fld        <= '0;
      rec        <= '0;
      pack       <= '0;
      wfld       <= '0;
      waddr      <= '0;
      done       <= 1'b0;
      trk_we     <= 1'b0;
      trk_waddr  <= '0;
      trk_wdata  <= '0;
      meas_we    <= 1'b0;
      meas_waddr <= '0;
      meas_wdata <= '0;
    end else begin
      done    <= 1'b0;
      trk_we  <= 1'b0;
      meas_we <= 1'b0;
      case (state)
        D_IDLE: begin
          req_cnt <= '0;
          rsp_cnt <= '0;
          fld     <= '0;
          rec     <= '0;
          if (start_load) begin
            if (load_tracks) begin
              state     <= D_LD_TRK;
              req_total <= CW'(n_trk) * CW'(TRK_WORDS);
            end else begin
              state     <= D_LD_MEAS;
              req_total <= CW'(n_meas) * CW'(MEAS_WORDS);
            end
          end else if (start_store) begin
            state <= (n_trk == 0) ? D_DONE : D_ST_RD;
            waddr <= res_base;
          end
        end
        D_LD_TRK, D_LD_MEAS: begin
          if (mem_req && mem_gnt) req_cnt <= req_cnt + 1'b1;
          if (mem_rvalid) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            if (fld == rec_words - 1'b1) begin
              fld <= '0;
              rec <= rec + 1'b1;
              if (state == D_LD_TRK) begin
                trk_we    <= 1'b1;
                trk_waddr <= TAW'(rec);
                trk_wdata <= pack_next;
              end else begin
                meas_we    <= 1'b1;
                meas_waddr <= MAW'(rec);
                meas_wdata <= pack_next[MEAS_WORDS*W-1:0];
              end
            end else begin
              fld <= fld + 1'b1;
            end
            pack <= pack_next;
          end
          // Phase complete once every requested word has come back.
          if (rsp_cnt + CW'(mem_rvalid) == req_total) begin
            req_cnt <= '0;
            rsp_cnt <= '0;
            fld     <= '0;
            rec     <= '0;
            if (state == D_LD_TRK) begin
              state     <= D_LD_MEAS;
              req_total <= CW'(n_meas) * CW'(MEAS_WORDS);
            end else begin
              state <= D_DONE;
            end
          end
        end
        D_ST_RD:   state <= D_ST_WAIT;
        D_ST_WAIT: begin
          pack  <= trk_rdata;
          wfld  <= '0;
          state <= D_ST_WR;
        end
        D_ST_WR: begin
          if (mem_gnt) begin
            waddr <= waddr + 1'b1;
            if (wfld == 4'(TRK_WORDS - 1)) begin
              rec   <= rec + 1'b1;
              state <= (rec + 1'b1 == n_trk) ? D_DONE : D_ST_RD;
            end else begin
              wfld <= wfld + 1'b1;
            end
          end
        end
        D_DONE: begin
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
